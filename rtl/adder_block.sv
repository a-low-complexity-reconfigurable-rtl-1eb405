// adder_block: third stage of the filter bank; adds adjacent subbands to
// form wider (non-uniform) channels and lets channels be placed anywhere.
//
// Stage 1 (registered) works on mirror pairs. A 2-input multiplexer per pair
// (band-k or band-(8-k), bit 0 of Sel_band, "mirror") feeds the adders:
//     COMB_UP1   = b0' + b1'     COMB_UP2   = b8' + b7'   (the other end)
//     COMB_DOWN2 = b2' + b3'     COMB_DOWN3 = b6' + b5'
// where bk' = mirror ? band-(8-k) : band-k. Without mirror COMB_UP1 = 0+1,
// COMB_UP2 = 7+8, COMB_DOWN2 = 2+3, COMB_DOWN3 = 5+6; with mirror the pairs
// swap.
// Stage 2 (registered) chooses stage-1 results with multiplexers and adds:
//     COMB_DOWN1 = Sel_band[2:1]: 00 b2'   01 b2'+b3'   10 b2'+b3'+b4
//                                 11 b3'+b4
//     COMB       = head + COMB_DOWN1, head = 0 when Sel_band[3] = 0;
//                  otherwise, for COMB_DOWN1 = b3'+b4, head = Sel_band[4] ?
//                  COMB_DOWN3 : b5', and for the other COMB_DOWN1 values
//                  head = Sel_band[4] ? COMB_UP1 : b1'. COMB is thus always
//                  a run of adjacent bands, on either side of band-4
//     COMB1      = COMB_UP2 + (Sel_band[5] ? b6' : COMB_DOWN3)
// Examples: Sel_band = 011000 -> COMB = 0+1+2, COMB1 = 5+6+7+8;
// 011100 -> COMB = 0+1+2+3+4, COMB_DOWN1 = 2+3+4; 001101 -> COMB = 7+6+5+4,
// COMB1 = 0+1+2+3, COMB_UP1 = 8+7; 011110 -> COMB = 3+4+5+6.
// Every run of 2 to 4 adjacent bands is one of the outputs for some Sel_band.
// The nine single bands are passed through with the same two-cycle latency.
//
// Interface: bands with in_valid, comb_en high when the modal and
// complementary filters use the same D (otherwise adjacent bands have
// mismatched edges and the sums are not valid channels); comb_valid is
// comb_en delayed with the data. Sums are DW+3 bits wide (no overflow).
// Latency: 2 clocks from in_valid to out_valid.
// The mirror-pair multiplexers, the four stage-1 sums and the three stage-2
// outputs follow the design; the Sel_band bit assignment is this
// implementation's own.
module adder_block
  import fb_pkg::*;
#(
  parameter int SW = DW + 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  sample_t           band_in [N_BANDS],
  input  logic [SELB_W-1:0] sel_band,
  input  logic              comb_en,
  output logic              out_valid,
  output logic              comb_valid,
  output sample_t           band_out [N_BANDS],
  output logic signed [SW-1:0] comb,
  output logic signed [SW-1:0] comb1,
  output logic signed [SW-1:0] comb_up1,
  output logic signed [SW-1:0] comb_up2,
  output logic signed [SW-1:0] comb_down1,
  output logic signed [SW-1:0] comb_down2,
  output logic signed [SW-1:0] comb_down3
);

  typedef logic signed [SW-1:0] sum_t;

  function automatic sum_t ext(input sample_t v);
    return sum_t'(v);
  endfunction

  // ---- stage 1 -------------------------------------------------------------
  logic              v1, en1;
  logic [SELB_W-1:1] sel1;   // bit 0 (mirror) is used in stage 1 only
  sample_t           bd1 [N_BANDS];
  sum_t              up1_r, up2_r, dn2_r, dn3_r;
  sample_t           b1m_r, b2m_r, b3m_r, b4_r, b5m_r, b6m_r;

  sample_t bm [N_BANDS];   // mirror-selected bands
  always_comb begin
    for (int k = 0; k < N_BANDS; k++)
      bm[k] = sel_band[0] ? band_in[N_BANDS - 1 - k] : band_in[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      en1 <= 1'b0;
      sel1 <= '0;
      for (int k = 0; k < N_BANDS; k++) bd1[k] <= '0;
      {up1_r, up2_r, dn2_r, dn3_r} <= '0;
      {b1m_r, b2m_r, b3m_r, b4_r, b5m_r, b6m_r} <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        en1  <= comb_en;
        sel1 <= sel_band[SELB_W-1:1];
        bd1  <= band_in;
        up1_r <= ext(bm[0]) + ext(bm[1]);
        up2_r <= ext(bm[8]) + ext(bm[7]);
        dn2_r <= ext(bm[2]) + ext(bm[3]);
        dn3_r <= ext(bm[6]) + ext(bm[5]);
        b1m_r <= bm[1];
        b2m_r <= bm[2];
        b3m_r <= bm[3];
        b4_r  <= bm[4];
        b5m_r <= bm[5];
        b6m_r <= bm[6];
      end
    end
  end

  // ---- stage 2 -------------------------------------------------------------
  sum_t down1_c, head_c;
  always_comb begin
    unique case (sel1[2:1])
      2'b00:   down1_c = ext(b2m_r);
      2'b01:   down1_c = dn2_r;
      2'b10:   down1_c = dn2_r + ext(b4_r);
      default: down1_c = ext(b3m_r) + ext(b4_r);
    endcase
    if (!sel1[3])                head_c = '0;
    else if (sel1[2:1] == 2'b11) head_c = sel1[4] ? dn3_r : ext(b5m_r);
    else if (sel1[4])            head_c = up1_r;
    else                         head_c = ext(b1m_r);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      comb_valid <= 1'b0;
      for (int k = 0; k < N_BANDS; k++) band_out[k] <= '0;
      {comb, comb1, comb_up1, comb_up2, comb_down1, comb_down2, comb_down3} <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        comb_valid <= en1;
        band_out   <= bd1;
        comb_up1   <= up1_r;
        comb_up2   <= up2_r;
        comb_down2 <= dn2_r;
        comb_down3 <= dn3_r;
        comb_down1 <= down1_c;
        comb       <= head_c + down1_c;
        comb1      <= up2_r + (sel1[5] ? ext(b6m_r) : dn3_r);
      end
    end
  end

endmodule
