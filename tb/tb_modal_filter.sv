// tb_modal_filter: self-checking test of the modal/complementary stage.
// Random Q1.15 coefficients (the unique half h[0..137]) and random samples
// are applied; the reference computes directly
//   ya[n] = Q( Dm * sum_k h[k*Dm] x[n-k*8] )
//   yc[n] = Q( x[n-Nd(Dc)]*2^15 - Dc * sum_k h[k*Dc] x[n-k*8] )
// with h[i] = h[275-i], Nd from Eq. 4 (hand values 368/272/224/184/160),
// Q = floor(/2^15) then clamp to 16 bits. Covers every D on both paths,
// different D on the two paths, a change of D without reset (checked after
// the settling time) and the one-clock output latency.
module tb_modal_filter;
  import fb_pkg::*;
  localparam int N = 276, M = 8, NH = 138;
  localparam int ND_EXP [5] = '{368, 272, 224, 184, 160};

  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t x = '0, ya, yc;
  logic [4:0] sel_modal = 5'b00001, sel_comp = 5'b00001;
  coef_t coef [NH];
  logic out_valid;
  int checks = 0, failures = 0;
  longint hist [$];    // input history, hist[$] is the newest
  int h [N];

  modal_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint xs(int j);   // x[n-j], zero before reset
    return (j < hist.size()) ? hist[hist.size() - 1 - j] : 0;
  endfunction

  function automatic longint q15(longint v);
    longint s;
    s = (v >= 0) ? v / 32768 : -((-v + 32767) / 32768);   // floor division
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return s;
  endfunction

  function automatic longint chain(int d);
    longint s = 0;
    for (int k = 0; k * d <= N - 1; k++) s += longint'(h[k * d]) * xs(k * M);
    return s;
  endfunction

  // run L samples at (dm, dc); check after 'skip' samples
  task automatic run(int dm, int dc, int L, int skip);
    sel_modal = 5'(1 << (dm - 3));
    sel_comp  = 5'(1 << (dc - 3));
    for (int n = 0; n < L; n++) begin
      longint wa, wc;
      x = sample_t'($signed($urandom_range(0, 16383)) - 8192);
      in_valid = 1;
      @(posedge clk);
      hist.push_back(longint'(x));
      wa = q15(chain(dm) * dm);
      wc = q15(xs(ND_EXP[dc - 3]) * 32768 - chain(dc) * dc);
      #1 in_valid = 0;
      // registered output is present one clock after the sample
      checks++;
      if (!out_valid) failures++;
      if (n >= skip) begin
        checks += 2;
        if (ya !== sample_t'(wa) || yc !== sample_t'(wc)) begin
          failures++;
          if (failures < 10)
            $display("Dm=%0d Dc=%0d n=%0d ya=%0d/%0d yc=%0d/%0d", dm, dc, n, ya, wa, yc, wc);
        end
      end
      if ($urandom_range(0, 4) == 0) begin
        @(posedge clk); #1;
        checks++;
        if (out_valid) failures++;   // no sample, no output
      end
    end
  endtask

  task automatic do_reset();
    rst_n = 0;
    @(posedge clk); #1;
    rst_n = 1;
    hist.delete();
  endtask

  initial begin
    for (int i = 0; i < NH; i++) coef[i] = coef_t'($signed($urandom_range(0, 1023)) - 512);
    for (int i = 0; i < N; i++) h[i] = coef[(i < N - 1 - i) ? i : N - 1 - i];
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // every D, both paths alike
    for (int d = 3; d <= 7; d++) begin
      do_reset();
      run(d, d, 400, 0);
    end
    // architecture-level: different D on the two paths
    do_reset(); run(3, 7, 300, 0);
    do_reset(); run(6, 4, 300, 0);
    // change of D without reset: check once the old state has left
    run(5, 5, 1200, 728 + 368);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
