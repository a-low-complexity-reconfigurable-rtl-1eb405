// masking_fir: fixed-coefficient linear-phase masking filter with
// coefficient decimation I (CD-I) outputs.
//
// CD-I by D keeps every D-th coefficient of a filter and zeroes the rest;
// the result has copies of the original response at multiples of 2*pi/D
// (gain 1/D). To offer the full filter and its CD-I versions for D = 2 and
// D = 4 from one set of multipliers, the taps are split by index class and
// each class is summed in its own transposed-form chain:
//     p0 = sum_{n mod 4 = 0} h[n] x[m-n]
//     p2 = sum_{n mod 4 = 2} h[n] x[m-n]
//     p1 = sum_{n odd}       h[n] x[m-n]
// so that   H       = p0 + p2 + p1
//           CD-I(2) = p0 + p2
//           CD-I(4) = p0.
// The input is multiplied once by each of the (NT+1)/2 distinct coefficients
// (symmetry h[n] = h[NT-1-n]); constant multiplications reduce to shifts and
// adds in synthesis.
//
// Interface: x with in_valid (one sample per in_valid); p0/p2/p1 are full
// precision (Q2.30) combinational sums for the sample on x, to be registered
// by the user in the in_valid cycle. Latency 0; group delay (NT-1)/2 samples.
// Fixed coefficients, transposed form and CD-I follow the design; the split
// into per-class chains is this implementation's way of producing the CD-I
// outputs.
module masking_fir
  import fb_pkg::*;
#(
  parameter int NT = H1_LEN,
  parameter int NU = (NT + 1) / 2,
  parameter int HALF [NU] = H1_HALF
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t x,
  output acc_t    p0,
  output acc_t    p2,
  output acc_t    p1
);

  localparam int PW = DW + CW;

  function automatic int fold(input int i);
    return (i < NT - 1 - i) ? i : NT - 1 - i;
  endfunction

  logic signed [PW-1:0] prod [NU];
  for (genvar u = 0; u < NU; u++) begin : g_mult
    assign prod[u] = coef_t'(HALF[u]) * x;
  end

  // chain c: 0 -> n mod 4 = 0, 1 -> n mod 4 = 2, 2 -> n odd
  acc_t acc [3][NT];
  acc_t dly [3][NT];

  for (genvar c = 0; c < 3; c++) begin : g_cls
    for (genvar n = 0; n < NT; n++) begin : g_tap
      localparam bit MINE = (c == 0) ? (n % 4 == 0) :
                            (c == 1) ? (n % 4 == 2) : (n % 2 == 1);
      acc_t term;
      if (MINE) begin : g_on
        assign term = acc_t'(prod[fold(n)]);
      end else begin : g_off
        assign term = '0;
      end
      if (n == NT - 1) begin : g_last
        assign acc[c][n] = term;
      end else begin : g_mid
        assign acc[c][n] = term + dly[c][n+1];
      end
      if (n == 0) begin : g_first
        assign dly[c][n] = '0;
      end else begin : g_reg
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n)        dly[c][n] <= '0;
          else if (in_valid) dly[c][n] <= acc[c][n];
        end
      end
    end
  end

  assign p0 = acc[0][0];
  assign p2 = acc[1][0];
  assign p1 = acc[2][0];

endmodule
