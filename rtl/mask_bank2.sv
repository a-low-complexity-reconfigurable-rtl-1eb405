// mask_bank2: masking filter bank for the complementary response (Bank 2).
//
// The complementary response Hc(z^(M/D)) has passbands centred at pi/8,
// 3pi/8, 5pi/8 and 7pi/8 (band-1, 3, 5, 7). Two fixed filters extract them:
//   H3 (65 taps, band-pass around 3pi/8):
//     band-3 = H3                    = p0 + p2 + p1
//     band-5 = 2*CD-I(2) - H3        = p0 + p2 - p1   (H3 moved by pi: the
//                                      copy at 3pi/8 - pi lands on -5pi/8)
//   H4 (21 taps, low-pass, passes band-1):
//     band-1 = H4
//     band-7 = 2*CD-I(2) - H4        (H4 moved to pi)
// The H4 outputs are delayed by 22 samples so that all four bands have the
// 32-sample group delay of the 65-tap filters, the same as Bank 1.
// Each band is truncated and saturated to Q1.15.
//
// Interface: c is the complementary filter output with in_valid. Bands are
// registered: they appear one clock after the sample, with out_valid.
// The use of H3, H4 and their CD-I with D = 2 follows the design; the
// coefficient values (fb_pkg) are this implementation's.
module mask_bank2
  import fb_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t c,
  output logic    out_valid,
  output sample_t b1,
  output sample_t b3,
  output sample_t b5,
  output sample_t b7
);

  acc_t h3_p0, h3_p2, h3_p1, h4_p0, h4_p2, h4_p1;

  masking_fir #(.NT(H3_LEN), .HALF(H3_HALF)) u_h3 (
    .clk, .rst_n, .in_valid, .x(c), .p0(h3_p0), .p2(h3_p2), .p1(h3_p1));
  masking_fir #(.NT(H4_LEN), .HALF(H4_HALF)) u_h4 (
    .clk, .rst_n, .in_valid, .x(c), .p0(h4_p0), .p2(h4_p2), .p1(h4_p1));

  acc_t h4_lp, h4_hp, h4_lp_d, h4_hp_d;
  assign h4_lp = h4_p0 + h4_p2 + h4_p1;
  assign h4_hp = h4_p0 + h4_p2 - h4_p1;

  align_delay #(.W(ACC_W), .DEPTH(ALIGN_DLY)) u_al_lp (
    .clk, .rst_n, .in_valid, .d(h4_lp), .q(h4_lp_d));
  align_delay #(.W(ACC_W), .DEPTH(ALIGN_DLY)) u_al_hp (
    .clk, .rst_n, .in_valid, .d(h4_hp), .q(h4_hp_d));

  acc_t f1, f3, f5, f7;
  always_comb begin
    f3 = h3_p0 + h3_p2 + h3_p1;
    f5 = h3_p0 + h3_p2 - h3_p1;
    f1 = h4_lp_d;
    f7 = h4_hp_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      {b1, b3, b5, b7} <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        b1 <= quant(f1);
        b3 <= quant(f3);
        b5 <= quant(f5);
        b7 <= quant(f7);
      end
    end
  end

endmodule
