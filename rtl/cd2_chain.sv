// cd2_chain: transposed-form tap chain of the modal filter with coefficient
// decimation II (CD-II) and interpolation by M.
//
// For decimation factor D the chain realises
//     y[n] = sum_{k=0}^{K_D-1} h[k*D] * x[n - k*M],   K_D = floor((N-1)/D)+1
// i.e. every D-th modal coefficient is kept and the kept coefficients are
// packed next to each other (CD-II), and every unit delay is replaced by M
// delays (interpolation). The chain has K = floor((N-1)/DMIN)+1 adder
// positions. The products h[i]*x[n] arrive from a shared multiplier block
// (indexed by the folded coefficient index min(i, N-1-i)), so the chain holds
// no multipliers: position k takes product h[k*D] through a one-hot AND-OR
// multiplexer driven by the 5-bit select (one bit per D). A coefficient used
// by several D (h[6] serves D = 3 and D = 6 at different positions) is
// multiplied once. Positions beyond K_D add zero.
//
// Timing: the M-deep delay registers advance on in_valid; y is the
// combinational sum at position 0 for the sample currently on the input,
// so y must be sampled in the cycle in_valid is high. After a change of
// sel the chain still holds partial sums of the old D for (K-1)*M samples.
// The structure follows the design's modal filter; the packing of products
// by folded index is this implementation's choice.
module cd2_chain
  import fb_pkg::*;
#(
  parameter int N    = N_MODAL,
  parameter int M    = M_INTERP,
  parameter int DMIN = D_MIN,
  parameter int DMAX = D_MAX,
  parameter int ND   = DMAX - DMIN + 1,
  parameter int NH   = (N + 1) / 2,
  parameter int PW   = DW + CW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [PW-1:0]  prod [NH],
  input  logic [ND-1:0]         sel,
  output acc_t                  y
);

  localparam int K = cd2_taps(N, DMIN);

  function automatic int fold(input int i);
    return (i < N - 1 - i) ? i : N - 1 - i;
  endfunction

  acc_t g   [K];   // selected product per position
  acc_t acc [K];   // partial sum leaving each position
  acc_t dl_out [K];  // partial sum of position k, delayed by M samples

  for (genvar k = 0; k < K; k++) begin : g_pos
    // product selection for position k: one AND-OR input per D
    always_comb begin
      g[k] = '0;
      for (int d = 0; d < ND; d++)
        if (sel[d] && (k * (DMIN + d) <= N - 1))
          g[k] |= acc_t'(prod[fold(k * (DMIN + d))]);
    end

    if (k == K - 1) begin : g_last
      assign acc[k] = g[k];
    end else begin : g_mid
      assign acc[k] = g[k] + dl_out[k+1];
    end

    if (k == 0) begin : g_first
      assign dl_out[k] = '0;   // position 0 feeds the output directly
    end else begin : g_dly
      logic [M-1:0][ACC_W-1:0] sr;   // sr[M-1] is the oldest
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)        sr <= '0;
        else if (in_valid) sr <= {sr[M-2:0], acc[k]};
      end
      assign dl_out[k] = acc_t'(sr[M-1]);
    end
  end

  assign y = acc[0];

endmodule
