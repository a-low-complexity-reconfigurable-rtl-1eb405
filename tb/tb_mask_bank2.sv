// tb_mask_bank2: self-checking test of masking Bank 2.
// Reference impulse responses (65 taps, built by modulation):
//   band-3: h3[n]            band-5: (-1)^n h3[n]
//   band-1: h4[n-22]         band-7: (-1)^n h4[n-22]
// convolved with the input history, truncated/saturated to Q1.15 and
// compared with the registered bands one clock after each sample.
module tb_mask_bank2;
  import fb_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t c = '0, b1, b3, b5, b7;
  int checks = 0, failures = 0;
  longint hist [$];
  longint r [4][65];   // responses of band 1,3,5,7

  mask_bank2 dut (.*);

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
    for (int n = 0; n < 65 && n < hist.size(); n++) s += r[b][n] * hist[hist.size() - 1 - n];
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
      longint h3, h4, sg;
      h3 = H3_HALF[(n < 64 - n) ? n : 64 - n];
      h4 = (n >= 22 && n < 43) ? H4_HALF[(n - 22 < 42 - n) ? n - 22 : 42 - n] : 0;
      sg = (n % 2 == 0) ? 1 : -1;
      r[0][n] = h4;
      r[1][n] = h3;
      r[2][n] = sg * h3;
      r[3][n] = sg * h4;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int m = 0; m < 3000; m++) begin
      c = (m % 300 == 0) ? 16'sh8000 : sample_t'($signed($urandom) >>> ($urandom_range(0, 2)));
      in_valid = 1;
      @(posedge clk);
      hist.push_back(longint'(c));
      #1 in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      cmp("b1", b1, fir(0));
      cmp("b3", b3, fir(1));
      cmp("b5", b5, fir(2));
      cmp("b7", b7, fir(3));
      if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
