// modal_coef_lut: coefficient look-up table of the modal filter.
//
// The modal filter is linear phase (h[n] = h[N-1-n]), so only the first
// NH = ceil(N/2) coefficients are stored; the modal filter folds tap indices
// onto this half. Loading a different table reconfigures the modal filter's
// pass- and stop-band edges (the "K modal filters" form of filter-level
// reconfiguration); the masking filters stay the same.
//
// Interface: one synchronous write port (we, addr, wdata). Every entry is
// visible at all times on the coef array output, because the transposed
// modal filter multiplies the current input sample by all coefficients in
// the same cycle. A write is visible from the cycle after it.
// Timing: writes take effect on the next rising clock edge. Reset clears
// the table to zero (the filter bank then outputs zero).
// Storing the coefficients in a LUT follows the design; the write port, its
// timing and the reset value are this implementation's choices.
module modal_coef_lut
  import fb_pkg::*;
#(
  parameter int N  = N_MODAL,
  parameter int NH = (N + 1) / 2,
  parameter int AW = $clog2(NH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  coef_t            wdata,
  output coef_t            coef [NH]
);

  // one register per entry: all entries are read in every cycle
  for (genvar i = 0; i < NH; i++) begin : g_entry
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                            coef[i] <= '0;
      else if (we && (int'(addr) == i))      coef[i] <= wdata;
    end
  end

endmodule
