// modal_filter: first stage of the filter bank (modal and complementary
// filters with CD-II and interpolation).
//
// The input x is multiplied once by every modal coefficient that some
// D in DMIN..DMAX uses (a shared multiplier block, coefficients taken from
// the LUT). Two tap chains (cd2_chain) use these products:
//   * the upper chain, steered by sel_modal, gives the modal response
//     Ha(z^(M/D)): passbands of width set by D centred on 0, 2pi/8, ..., pi
//     (band-0, 2, 4, 6, 8);
//   * the lower chain, steered by sel_comp, is subtracted from the input
//     delayed by Nd(D) samples (comp_delay), giving the complementary
//     response Hc(z^(M/D)) (band-1, 3, 5, 7).
// sel_modal and sel_comp are one-hot, bit i selecting D = DMIN + i
// (00001 -> D=3, 00010 -> D=4, ..., 10000 -> D=7). Using different D in the
// two chains is the design's "architecture level" reconfiguration.
//
// CD-II lowers the passband gain to about 1/D, so both chain outputs are
// multiplied by D (shift and add) before use; this gain correction is this
// implementation's addition.
// Timing: one sample per in_valid; ya and yc are registered and appear one
// clock after the sample, with out_valid. Outputs are Q1.15, truncated and
// saturated from full precision. Filter state is not flushed on a change of
// D: outputs settle (K-1)*M + Nd samples later.
// The structure (shared products, muxes per tap, delayed-input subtraction)
// follows the design; number formats and the valid/latency scheme are this
// implementation's choices. rst_n both resets the registers asynchronously
// and disables the select assertion during reset; lint tools report this
// mixed use, which is intended.
module modal_filter
  import fb_pkg::*;
#(
  parameter int N    = N_MODAL,
  parameter int M    = M_INTERP,
  parameter int DMIN = D_MIN,
  parameter int DMAX = D_MAX,
  parameter int ND   = DMAX - DMIN + 1,
  parameter int NH   = (N + 1) / 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  sample_t       x,
  input  logic [ND-1:0] sel_modal,
  input  logic [ND-1:0] sel_comp,
  input  coef_t         coef [NH],
  output logic          out_valid,
  output sample_t       ya,
  output sample_t       yc
);

  localparam int PW = DW + CW;

  // true if folded coefficient index u is used by some D
  function automatic bit used(input int u);
    for (int d = DMIN; d <= DMAX; d++)
      for (int k = 0; k * d <= N - 1; k++)
        if (k * d == u || k * d == N - 1 - u) return 1'b1;
    return 1'b0;
  endfunction

  logic signed [PW-1:0] prod [NH];

  for (genvar u = 0; u < NH; u++) begin : g_mult
    if (used(u)) begin : g_used
      assign prod[u] = coef[u] * x;
    end else begin : g_skip
      assign prod[u] = '0;
    end
  end

  // CD-II keeps one coefficient in D, so the passband gain of the decimated
  // filter is about 1/D; the chain outputs are multiplied by D (a small
  // constant: shift and add) to restore unity gain, which the complementary
  // subtraction needs.
  function automatic acc_t dgain(input acc_t v, input logic [ND-1:0] sel);
    acc_t r = '0;
    int   f;
    for (int d = 0; d < ND; d++) begin
      f = DMIN + d;
      if (sel[d]) r |= v * acc_t'(f);
    end
    return r;
  endfunction

  acc_t    y_up, y_low;
  sample_t x_d;

  cd2_chain #(.N(N), .M(M), .DMIN(DMIN), .DMAX(DMAX), .NH(NH)) u_upper (
    .clk, .rst_n, .in_valid, .prod, .sel(sel_modal), .y(y_up));

  cd2_chain #(.N(N), .M(M), .DMIN(DMIN), .DMAX(DMAX), .NH(NH)) u_lower (
    .clk, .rst_n, .in_valid, .prod, .sel(sel_comp), .y(y_low));

  comp_delay #(.N(N), .M(M), .DMIN(DMIN), .DMAX(DMAX)) u_cdly (
    .clk, .rst_n, .in_valid, .x, .sel(sel_comp), .x_d);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ya        <= '0;
      yc        <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        ya <= quant(dgain(y_up, sel_modal));
        yc <= quant((acc_t'(x_d) <<< FRAC) - dgain(y_low, sel_comp));
      end
    end
  end

  property p_onehot_sel;
    @(posedge clk) disable iff (!rst_n) in_valid |-> $onehot0(sel_modal) && $onehot0(sel_comp);
  endproperty
  a_onehot_sel: assert property (p_onehot_sel)
    else $error("modal_filter: Sel_modal/Sel_comp must be one-hot");

endmodule
