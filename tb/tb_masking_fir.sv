// tb_masking_fir: self-checking test of the CD-I masking filter.
// Two instances (H1: 65 taps, H4: 21 taps) are fed random samples with gaps
// in in_valid. The reference rebuilds the full symmetric impulse response
// from the half table and computes by direct convolution
//   p0 = sum_{n%4==0} h[n]x[m-n], p2 = sum_{n%4==2} ..., p1 = sum_{n odd} ...
// and compares all three partial sums of both filters every sample.
module tb_masking_fir;
  import fb_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t x = '0;
  acc_t a0, a2, a1, b0, b2, b1;
  int checks = 0, failures = 0;
  longint hist [$];

  masking_fir u_a (.clk, .rst_n, .in_valid, .x, .p0(a0), .p2(a2), .p1(a1));
  masking_fir #(.NT(H4_LEN), .HALF(H4_HALF)) u_b (
    .clk, .rst_n, .in_valid, .x, .p0(b0), .p2(b2), .p1(b1));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint conv(int nt, int half [], int cls);
    longint s = 0;
    for (int n = 0; n < nt; n++) begin
      int hn;
      bit mine;
      hn = half[(n < nt - 1 - n) ? n : nt - 1 - n];
      mine = (cls == 0) ? (n % 4 == 0) : (cls == 1) ? (n % 4 == 2) : (n % 2 == 1);
      if (mine && n < hist.size()) s += longint'(hn) * hist[hist.size() - 1 - n];
    end
    return s;
  endfunction

  task automatic cmp(string nm, acc_t got, longint want);
    checks++;
    if (longint'(got) != want) begin
      failures++;
      if (failures < 10) $display("%s got %0d want %0d", nm, got, want);
    end
  endtask

  initial begin
    int h1 [], h4 [];
    h1 = new[33]; h4 = new[11];
    foreach (h1[i]) h1[i] = H1_HALF[i];
    foreach (h4[i]) h4[i] = H4_HALF[i];
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int m = 0; m < 2000; m++) begin
      x = (m % 200 == 0) ? 16'sh7fff : sample_t'($urandom);   // impulses and noise
      in_valid = 1;
      hist.push_back(longint'(x));
      #1;
      cmp("H1.p0", a0, conv(65, h1, 0));
      cmp("H1.p2", a2, conv(65, h1, 1));
      cmp("H1.p1", a1, conv(65, h1, 2));
      cmp("H4.p0", b0, conv(21, h4, 0));
      cmp("H4.p2", b2, conv(21, h4, 1));
      cmp("H4.p1", b1, conv(21, h4, 2));
      @(posedge clk);
      #1 in_valid = 0;
      if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
