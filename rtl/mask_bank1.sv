// mask_bank1: masking filter bank for the modal filter response (Bank 1).
//
// The modal response Ha(z^(M/D)) has passbands at 0, pi/4, pi/2, 3pi/4 and
// pi (band-0, 2, 4, 6, 8). Two fixed filters extract all five:
//   H1 (65 taps, low-pass, passes band-0 only):
//     band-0 = H1                          = p0 + p2 + p1
//     band-8 = 2*CD-I(2) - H1              = p0 + p2 - p1     (H1 moved to pi)
//     band-4 = 4*CD-I(4) - 2*CD-I(2)       = 2*(p0 - p2)      (H1 moved to pi/2)
//   H2 (21 taps, low-pass, passes band-0 and band-2):
//     band-2 = H2 - band-0
//     band-6 = (2*CD-I(2) - H2) - band-8   (H2 moved to pi, minus band-8)
// The H2 terms are delayed by 22 samples so that both filters have the
// group delay of H1 (32 samples) before they are subtracted.
// All arithmetic is at full precision; each band is then truncated and
// saturated to Q1.15.
//
// Interface: a is the modal filter output with in_valid. Bands are
// registered: they appear one clock after the sample, with out_valid.
// The use of H1, H2 and CD-I with D = 2 and 4 follows the design; the
// coefficient values (fb_pkg) and the factors 2 and 4 that undo the 1/D gain
// of CD-I are this implementation's.
module mask_bank1
  import fb_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t a,
  output logic    out_valid,
  output sample_t b0,
  output sample_t b2,
  output sample_t b4,
  output sample_t b6,
  output sample_t b8
);

  acc_t h1_p0, h1_p2, h1_p1, h2_p0, h2_p2, h2_p1;

  masking_fir #(.NT(H1_LEN), .HALF(H1_HALF)) u_h1 (
    .clk, .rst_n, .in_valid, .x(a), .p0(h1_p0), .p2(h1_p2), .p1(h1_p1));
  masking_fir #(.NT(H2_LEN), .HALF(H2_HALF)) u_h2 (
    .clk, .rst_n, .in_valid, .x(a), .p0(h2_p0), .p2(h2_p2), .p1(h2_p1));

  acc_t h2_lp, h2_hp, h2_lp_d, h2_hp_d;
  assign h2_lp = h2_p0 + h2_p2 + h2_p1;
  assign h2_hp = h2_p0 + h2_p2 - h2_p1;

  align_delay #(.W(ACC_W), .DEPTH(ALIGN_DLY)) u_al_lp (
    .clk, .rst_n, .in_valid, .d(h2_lp), .q(h2_lp_d));
  align_delay #(.W(ACC_W), .DEPTH(ALIGN_DLY)) u_al_hp (
    .clk, .rst_n, .in_valid, .d(h2_hp), .q(h2_hp_d));

  acc_t f0, f2, f4, f6, f8;
  always_comb begin
    f0 = h1_p0 + h1_p2 + h1_p1;
    f8 = h1_p0 + h1_p2 - h1_p1;
    f4 = (h1_p0 - h1_p2) <<< 1;
    f2 = h2_lp_d - f0;
    f6 = h2_hp_d - f8;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      {b0, b2, b4, b6, b8} <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        b0 <= quant(f0);
        b2 <= quant(f2);
        b4 <= quant(f4);
        b6 <= quant(f6);
        b8 <= quant(f8);
      end
    end
  end

endmodule
