// align_delay: fixed delay of DEPTH samples for a W-bit value.
//
// Used to give every extracted subband the same group delay before the
// subbands are subtracted from each other or combined: the outputs of the
// 21-tap masking filters are delayed by (65-21)/2 = 22 samples to line up
// with the 65-tap ones. A shift register advances on in_valid; q is the
// value d had DEPTH valid samples earlier. DEPTH = 0 passes d through.
// Aligning the group delays follows the design; the shift-register form is
// this implementation's choice.
module align_delay #(
  parameter int W     = 40,
  parameter int DEPTH = 22
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (DEPTH == 0) begin : g_none
    assign q = d;
  end else if (DEPTH == 1) begin : g_one
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        q <= '0;
      else if (in_valid) q <= d;
    end
  end else begin : g_sr
    logic [DEPTH-1:0][W-1:0] sr;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        sr <= '0;
      else if (in_valid) sr <= {sr[DEPTH-2:0], d};
    end
    assign q = sr[DEPTH-1];
  end

endmodule
