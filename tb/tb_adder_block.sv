// tb_adder_block: self-checking test of the subband adder block.
// Every Sel_band value is applied with random bands. The expected outputs
// are formed from lists of band indices (mirror k -> 8-k when Sel_band[0]):
//   COMB_UP1 {0,1}  COMB_UP2 {8,7}  COMB_DOWN2 {2,3}  COMB_DOWN3 {6,5}
//   COMB_DOWN1 {2} | {2,3} | {2,3,4} | {3,4}   by Sel_band[2:1]
//   COMB = head + COMB_DOWN1, head {} | {1} | {0,1} by Sel_band[4:3],
//          or {} | {5} | {5,6} when COMB_DOWN1 = {3,4}
//   COMB1 = {8,7} + ({6} if Sel_band[5] else {6,5})
// The test also checks that every list is a run of adjacent bands, that
// every run of 2 to 4 adjacent bands is produced by some Sel_band, that
// the outputs appear exactly two clocks after the input (with gaps in
// in_valid) and that comb_valid follows comb_en.
module tb_adder_block;
  import fb_pkg::*;
  localparam int SW = DW + 3;

  logic clk = 0, rst_n = 0, in_valid = 0, comb_en = 0;
  logic out_valid, comb_valid;
  sample_t band_in [N_BANDS];
  sample_t band_out [N_BANDS];
  logic [5:0] sel_band = '0;
  logic signed [SW-1:0] comb, comb1, comb_up1, comb_up2, comb_down1, comb_down2, comb_down3;
  int checks = 0, failures = 0;

  typedef struct {
    longint v [7];
    longint b [N_BANDS];
    bit en;
  } exp_t;
  exp_t q [$];

  adder_block dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit covered [N_BANDS][6];   // [first band][run length] seen

  function automatic longint sum_list(int l [$], sample_t b [N_BANDS], bit mir);
    longint s = 0;
    int lo = 99, hi = -1;
    foreach (l[i]) begin
      int k;
      k = mir ? 8 - l[i] : l[i];
      s += longint'(b[k]);
      if (k < lo) lo = k;
      if (k > hi) hi = k;
    end
    // adjacency: a set of size n spans exactly n bands
    checks++;
    if (l.size() > 1 && hi - lo + 1 == l.size()) covered[lo][l.size()] = 1'b1;
    if (l.size() > 0 && hi - lo + 1 != l.size()) begin
      failures++;
      $display("non-adjacent band set");
    end
    return s;
  endfunction

  function automatic exp_t expect_of(sample_t b [N_BANDS], logic [5:0] s, bit en);
    exp_t e;
    int d1 [$], hd [$], c [$], c1 [$];
    bit m = s[0];
    case (s[2:1])
      2'b00: d1 = '{2};
      2'b01: d1 = '{2, 3};
      2'b10: d1 = '{2, 3, 4};
      2'b11: d1 = '{3, 4};
    endcase
    if (s[3]) begin
      if (s[2:1] == 2'b11) hd = s[4] ? '{5, 6} : '{5};
      else                 hd = s[4] ? '{0, 1} : '{1};
    end
    c = {hd, d1};
    c1 = s[5] ? '{6, 7, 8} : '{5, 6, 7, 8};
    e.v[0] = sum_list(c, b, m);
    e.v[1] = sum_list(c1, b, m);
    e.v[2] = sum_list('{0, 1}, b, m);
    e.v[3] = sum_list('{7, 8}, b, m);
    e.v[4] = sum_list(d1, b, m);
    e.v[5] = sum_list('{2, 3}, b, m);
    e.v[6] = sum_list('{5, 6}, b, m);
    foreach (b[k]) e.b[k] = b[k];
    e.en = en;
    return e;
  endfunction

  task automatic check_out(exp_t e);
    longint got [7];
    got = '{comb, comb1, comb_up1, comb_up2, comb_down1, comb_down2, comb_down3};
    checks++;
    if (!out_valid || comb_valid != e.en) begin
      failures++;
      $display("valid/comb_valid wrong");
    end
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (got[i] != e.v[i]) begin
        failures++;
        if (failures < 10) $display("output %0d got %0d want %0d", i, got[i], e.v[i]);
      end
    end
    for (int k = 0; k < N_BANDS; k++) begin
      checks++;
      if (longint'(band_out[k]) != e.b[k]) failures++;
    end
  endtask

  int sent = 0;
  initial begin
    foreach (band_in[k]) band_in[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 64 * 8; t++) begin
      sel_band = 6'(t % 64);
      comb_en = (t % 7 != 3);
      foreach (band_in[k]) band_in[k] = (t % 16 == 5) ? 16'sh7fff : sample_t'($urandom);
      q.push_back(expect_of(band_in, sel_band, comb_en));
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      sel_band = 6'($urandom);      // must not affect samples in flight
      if (t % 3 == 0) begin @(posedge clk); #1; end
    end
    repeat (4) @(posedge clk);
    for (int lo = 0; lo < N_BANDS; lo++)
      for (int n = 2; n <= 4 && lo + n <= N_BANDS; n++) begin
        checks++;
        if (!covered[lo][n]) begin
          failures++;
          $display("run of %0d bands from band-%0d is never produced", n, lo);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // outputs: exactly two clocks after each accepted sample
  logic v_d1 = 0, v_d2 = 0;
  always @(posedge clk) begin
    v_d2 <= v_d1;
    v_d1 <= in_valid && rst_n;
  end
  always @(negedge clk) if (rst_n) begin
    if (v_d2) check_out(q.pop_front());
    else begin
      checks++;
      if (out_valid) failures++;
    end
  end
endmodule
