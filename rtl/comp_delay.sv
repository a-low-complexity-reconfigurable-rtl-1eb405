// comp_delay: selectable delay of the input for the complementary filter.
//
// The complementary response Hc = z^-Nd - Ha' is formed by subtracting the
// (CD-II, interpolated) modal filter output from the input delayed by Nd
// samples. Nd depends on D (Eq. 4 of the design):
//     Nd(D) = (floor((N-1)/D) + (floor((N-1)/D) mod 2)) * M/2
// which for N = 276, M = 8 gives 368, 272, 224, 184, 160 for D = 3..7.
//
// How it works: a shift register of DEPTH = max Nd samples advances on every
// in_valid; the one-hot Sel_comp picks the tap at Nd(D) through an AND-OR
// multiplexer, as the Sel_comp signal of the design does.
// Interface: x is the input sample, presented with in_valid. x_d is the
// sample Nd(D) valid samples older than x, presented combinationally while
// x is on the input (x_d = x[n - Nd]). sel = 0 gives x_d = 0.
// The tap formula is the design's; the shift-register form, the one-hot AND-OR
// selection and the reset to zero are this implementation's choices.
module comp_delay
  import fb_pkg::*;
#(
  parameter int N    = N_MODAL,
  parameter int M    = M_INTERP,
  parameter int DMIN = D_MIN,
  parameter int DMAX = D_MAX,
  parameter int ND   = DMAX - DMIN + 1,
  parameter int DEPTH = comp_dly(N, DMIN, M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  sample_t       x,
  input  logic [ND-1:0] sel,
  output sample_t       x_d
);

  // line[j] holds x[n-j-1]
  logic [DEPTH-1:0][DW-1:0] line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        line <= '0;
    else if (in_valid) line <= {line[DEPTH-2:0], x};
  end

  always_comb begin
    x_d = '0;
    for (int d = 0; d < ND; d++)
      if (sel[d]) x_d |= sample_t'(line[comp_dly(N, DMIN + d, M) - 1]);
  end

  initial assert (DEPTH >= comp_dly(N, DMAX, M) && DEPTH >= comp_dly(N, DMIN, M))
    else $error("comp_delay: DEPTH too small");

endmodule
