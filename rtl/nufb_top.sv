// nufb_top: reconfigurable non-uniform filter bank channelizer.
//
// A wideband input sampled at Fs is split into M+1 = 9 subbands (band-0 at
// DC .. band-8 at Fs/2) whose widths are set at run time, and adjacent
// subbands can be added into wider channels. Three stages, all running at
// the input sample rate:
//   1. modal_filter: a 276-tap low-pass modal filter, coefficient-decimated
//      (CD-II) by D = 3..7 and interpolated by M = 8, gives passbands at
//      0, 2pi/8, .., pi whose width grows with D (band-0, 2, 4, 6, 8); the
//      complementary filter (delayed input minus a second chain) gives the
//      bands in between (band-1, 3, 5, 7), whose width shrinks with D.
//      Coefficients come from a writable LUT (modal_coef_lut).
//   2. mask_bank1 / mask_bank2: four fixed masking filters (H1..H4) and
//      their CD-I versions isolate the nine bands, all with the same group
//      delay.
//   3. adder_block: adds adjacent bands (up to four, five for COMB) under
//      Sel_band.
// Configuration: sel_modal / sel_comp are one-hot (bit i -> D = 3+i);
// equal values give uniform or contiguous non-uniform channels, different
// values give narrower bands on both responses, and then only the single
// bands are meaningful (comb_valid = 0). coef_we/coef_addr/coef_wdata
// load the modal coefficients h[0..137] (Q1.15, h[275-n] = h[n]).
// Timing: one sample per in_valid (in_valid may be high every clock);
// out_valid follows in_valid by 4 clocks (1 modal + 1 masking + 2 adder).
// In samples, a band's delay is about Nd(D) + 32 (Nd of comp_delay);
// near a modal band centre it is (K_D-1)*M/2 + 32, K_D = floor(275/D)+1,
// with odd modal bands inverted when K_D is even. After a change of D or of the
// coefficients the outputs settle within 728 + 368 + 64 samples.
// The three-stage structure and all sizes follow the design; number formats,
// handshake and the Sel_band bit assignment are this implementation's.
// rst_n is used both as asynchronous reset and to disable an assertion;
// lint tools report this mixed use, which is intended.
module nufb_top
  import fb_pkg::*;
#(
  parameter int N    = N_MODAL,
  parameter int M    = M_INTERP,
  parameter int DMIN = D_MIN,
  parameter int DMAX = D_MAX,
  parameter int ND   = DMAX - DMIN + 1,
  parameter int NH   = (N + 1) / 2,
  parameter int CAW  = $clog2(NH),
  parameter int SW   = DW + 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // coefficient LUT write port
  input  logic              coef_we,
  input  logic [CAW-1:0]    coef_addr,
  input  coef_t             coef_wdata,
  // configuration
  input  logic [ND-1:0]     sel_modal,
  input  logic [ND-1:0]     sel_comp,
  input  logic [SELB_W-1:0] sel_band,
  // sample stream
  input  logic              in_valid,
  input  sample_t           x,
  output logic              out_valid,
  output logic              comb_valid,
  output sample_t           band [N_BANDS],
  output logic signed [SW-1:0] comb,
  output logic signed [SW-1:0] comb1,
  output logic signed [SW-1:0] comb_up1,
  output logic signed [SW-1:0] comb_up2,
  output logic signed [SW-1:0] comb_down1,
  output logic signed [SW-1:0] comb_down2,
  output logic signed [SW-1:0] comb_down3
);

  coef_t   coef [NH];
  logic    v1, v2a, v2b;
  sample_t ya, yc;
  sample_t bands [N_BANDS];

  modal_coef_lut #(.N(N), .NH(NH), .AW(CAW)) u_lut (
    .clk, .rst_n, .we(coef_we), .addr(coef_addr), .wdata(coef_wdata), .coef);

  modal_filter #(.N(N), .M(M), .DMIN(DMIN), .DMAX(DMAX), .NH(NH)) u_modal (
    .clk, .rst_n, .in_valid, .x, .sel_modal, .sel_comp, .coef,
    .out_valid(v1), .ya, .yc);

  mask_bank1 u_bank1 (
    .clk, .rst_n, .in_valid(v1), .a(ya), .out_valid(v2a),
    .b0(bands[0]), .b2(bands[2]), .b4(bands[4]), .b6(bands[6]), .b8(bands[8]));

  mask_bank2 u_bank2 (
    .clk, .rst_n, .in_valid(v1), .c(yc), .out_valid(v2b),
    .b1(bands[1]), .b3(bands[3]), .b5(bands[5]), .b7(bands[7]));

  // "same D on both paths" travels with the samples it applies to
  logic en_m, en_b;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_m <= 1'b0;
      en_b <= 1'b0;
    end else begin
      if (in_valid) en_m <= (sel_modal == sel_comp);
      if (v1)       en_b <= en_m;
    end
  end

  adder_block #(.SW(SW)) u_add (
    .clk, .rst_n, .in_valid(v2a), .band_in(bands), .sel_band,
    .comb_en(en_b),
    .out_valid, .comb_valid, .band_out(band),
    .comb, .comb1, .comb_up1, .comb_up2, .comb_down1, .comb_down2, .comb_down3);

  // both masking banks are fed by the same stage-1 strobe
  a_banks_in_step: assert property (@(posedge clk) disable iff (!rst_n) v2a == v2b)
    else $error("nufb_top: masking banks out of step");

endmodule
