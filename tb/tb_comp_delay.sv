// tb_comp_delay: self-checking test of the complementary-path delay line.
// For each D the expected delay is the hand-evaluated Eq. 4 value
// (368, 272, 224, 184, 160 for D = 3..7 with N = 276, M = 8); random
// samples are streamed with gaps in in_valid and x_d is compared with a
// history of the stream. sel = 0 must give zero.
module tb_comp_delay;
  import fb_pkg::*;
  localparam int EXP [5] = '{368, 272, 224, 184, 160};

  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t x = '0, x_d;
  logic [4:0] sel = '0;
  int checks = 0, failures = 0;
  sample_t hist [$];

  comp_delay dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      // change D every 600 samples
      sel = (n / 600 < 5) ? 5'(1 << (n / 600)) : '0;
      x = sample_t'($urandom);
      in_valid = 1;
      #1;
      begin
        int dly;
        sample_t want;
        dly = (sel == 0) ? 0 : EXP[$clog2(sel)];
        want = (sel == 0) ? '0 : (hist.size() >= dly ? hist[hist.size() - dly] : '0);
        checks++;
        if (x_d !== want) begin
          failures++;
          if (failures < 10) $display("n=%0d sel=%b got %0d want %0d", n, sel, x_d, want);
        end
      end
      @(posedge clk);
      hist.push_back(x);
      #1 in_valid = 0;
      if ($urandom_range(0, 3) == 0) @(posedge clk);   // idle cycle
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
