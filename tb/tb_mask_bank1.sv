// tb_mask_bank1: self-checking test of masking Bank 1.
// The reference builds each band's 65-tap impulse response by modulating
// the masking filters directly (independent of the CD-I tap split):
//   band-0: h1[n]            band-8: (-1)^n h1[n]
//   band-4: 2 cos(pi n/2) h1[n]
//   band-2: h2[n-22] - h1[n]   band-6: (-1)^n (h2[n-22] - h1[n])
// convolves with the input history, truncates/saturates to Q1.15, and
// compares with the registered bands one clock after each sample.
module tb_mask_bank1;
  import fb_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t a = '0, b0, b2, b4, b6, b8;
  int checks = 0, failures = 0;
  longint hist [$];
  longint c [5][65];   // responses of band 0,2,4,6,8

  mask_bank1 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint q15(longint v);
    longint s;
    s = (v >= 0) ? v / 32768 : -((-v + 32767) / 32768);
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return s;
  endfunction

  function automatic longint fir(int b);
    longint s = 0;
    for (int n = 0; n < 65 && n < hist.size(); n++) s += c[b][n] * hist[hist.size() - 1 - n];
    return q15(s);
  endfunction

  task automatic cmp(string nm, sample_t got, longint want);
    checks++;
    if (longint'(got) != want) begin
      failures++;
      if (failures < 10) $display("%s got %0d want %0d", nm, got, want);
    end
  endtask

  initial begin
    for (int n = 0; n < 65; n++) begin
      longint h1, h2, sg, cs;
      h1 = H1_HALF[(n < 64 - n) ? n : 64 - n];
      h2 = (n >= 22 && n < 43) ? H2_HALF[(n - 22 < 42 - n) ? n - 22 : 42 - n] : 0;
      sg = (n % 2 == 0) ? 1 : -1;
      cs = (n % 4 == 0) ? 2 : (n % 4 == 2) ? -2 : 0;
      c[0][n] = h1;
      c[4][n] = cs * h1;
      c[1][n] = h2 - h1;
      c[2][n] = c[4][n];
      c[4][n] = sg * h1;
      c[3][n] = sg * (h2 - h1);
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int m = 0; m < 3000; m++) begin
      a = (m % 300 == 0) ? 16'sh7fff : sample_t'($signed($urandom) >>> ($urandom_range(0, 2)));
      in_valid = 1;
      @(posedge clk);
      hist.push_back(longint'(a));
      #1 in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      cmp("b0", b0, fir(0));
      cmp("b2", b2, fir(1));
      cmp("b4", b4, fir(2));
      cmp("b6", b6, fir(3));
      cmp("b8", b8, fir(4));
      if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
