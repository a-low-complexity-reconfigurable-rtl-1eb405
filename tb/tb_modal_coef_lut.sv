// tb_modal_coef_lut: self-checking test of the modal coefficient LUT.
// Writes random values to random addresses (including addresses past the
// table, which must be ignored), compares every entry with a model after
// each write, and checks that reset clears the table.
module tb_modal_coef_lut;
  import fb_pkg::*;
  localparam int NH = 138;
  localparam int AW = 8;

  logic clk = 0, rst_n = 0, we = 0;
  logic [AW-1:0] addr = '0;
  coef_t wdata = '0;
  coef_t coef [NH];
  coef_t model [NH];
  int checks = 0, failures = 0;

  modal_coef_lut #(.N(276)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int i = 0; i < NH; i++) begin
      checks++;
      if (coef[i] !== model[i]) begin
        failures++;
        if (failures < 10) $display("entry %0d: got %0d want %0d", i, coef[i], model[i]);
      end
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1 compare_all();
    for (int t = 0; t < 600; t++) begin
      we = 1;
      addr = (t < 138) ? AW'(t) : AW'($urandom_range(0, 255));
      wdata = coef_t'($urandom);
      @(posedge clk); #1;
      if (int'(addr) < NH) model[addr] = wdata;
      we = ($urandom_range(0, 3) == 0);   // idle write enable off sometimes
      we = 0;
      compare_all();
    end
    // no write when we is low
    addr = 5; wdata = 16'h1234; we = 0;
    @(posedge clk); #1 compare_all();
    // reset clears
    rst_n = 0; #1;
    foreach (model[i]) model[i] = '0;
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
