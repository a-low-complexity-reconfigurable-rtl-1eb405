// fb_pkg: constants, coefficient tables and arithmetic helpers shared by the
// reconfigurable non-uniform filter bank.
//
// The filter bank splits 0..Fs/2 into M+1 = 9 subbands (band-0 .. band-8).
// Its numbers follow the published design example: interpolation factor
// M = 8, a 276-tap modal filter (Fpass = 0.083, Fstop = 0.115, frequencies
// normalised to Fs/2), coefficient decimation factor D = 3..7, masking filter
// lengths 65 (H1, H3) and 21 (H2, H4), 16-bit samples.
//
// Number formats (a choice of this design): samples and coefficients are
// signed Q1.15. Products are Q2.30 and are summed at full precision in ACC_W
// bits; a filter output is converted back to Q1.15 by an arithmetic right
// shift of FRAC bits (truncation toward minus infinity) followed by
// saturation to DW bits.
//
// Masking filter coefficients: equiripple (Parks-McClellan) linear-phase
// designs, quantised as round(h * 2^15). Only the first (N+1)/2 coefficients
// are listed; h[N-1-n] = h[n]. Band edges, normalised to Fs/2:
//   H1, 65 taps, low-pass : pass 0 .. 0.10,   stop 0.15 .. 1
//   H2, 21 taps, low-pass : pass 0 .. 0.35,   stop 0.40 .. 1
//   H3, 65 taps, band-pass: stop 0 .. 0.2189, pass 0.2811 .. 0.4689,
//                           stop 0.5311 .. 1
//   H4, 21 taps, low-pass : pass 0 .. 0.2189, stop 0.2811 .. 1
// The edges are the widest band-0, band-2 (modal response, D = 7) and
// band-1, band-3 (complementary response, D = 3) of the design example.
package fb_pkg;

  // ---- sizes of the design example ------------------------------------
  localparam int DW       = 16;   // sample width
  localparam int CW       = 16;   // coefficient width
  localparam int FRAC     = 15;   // fractional bits of samples/coefficients
  localparam int ACC_W    = 40;   // full precision accumulator width
  localparam int M_INTERP = 8;    // interpolation factor M
  localparam int N_MODAL  = 276;  // modal filter length N
  localparam int D_MIN    = 3;    // smallest decimation factor
  localparam int D_MAX    = 7;    // largest decimation factor
  localparam int N_D      = D_MAX - D_MIN + 1;  // width of Sel_modal/Sel_comp
  localparam int N_BANDS  = M_INTERP + 1;       // 9 subbands
  localparam int SELB_W   = 6;    // width of Sel_band

  // ---- masking filters ---------------------------------------------------
  localparam int H1_LEN = 65;
  localparam int H2_LEN = 21;
  localparam int H3_LEN = 65;
  localparam int H4_LEN = 21;

  localparam int H1_HALF [33] = '{
      264, -189, -184, -196, -205, -197, -162,  -97,   -6,  103,  212,
      306,  363,  367,  308,  184,    2, -216, -442, -638, -767, -790,
     -678, -416,   -3,  545, 1190, 1885, 2572, 3188, 3677, 3991, 4099};
  localparam int H2_HALF [11] = '{
     -866, -3225, 573, 1196, 1243, -797, -2580, -1322, 3678, 9629, 12290};
  localparam int H3_HALF [33] = '{
       69,  -23,  110,  283,  -37, -231, -196,   77,  -12,  -53,  244,
      496,   -7, -595, -396,  132,    0, -151,  585, 1120,   -1, -1403,
     -930,  311,    3, -410, 1664, 3458,    0, -5875, -5193, 3053, 8196};
  localparam int H4_HALF [11] = '{
     2359, 554, -172, -1145, -1809, -1577, -154, 2271, 5033, 7217, 8046};

  // Delay that aligns a 21-tap masking filter with a 65-tap one:
  // (65-1)/2 - (21-1)/2 = 22 samples.
  localparam int ALIGN_DLY = (H1_LEN - H2_LEN) / 2;

  // ---- helpers ------------------------------------------------------------
  typedef logic signed [DW-1:0]    sample_t;
  typedef logic signed [CW-1:0]    coef_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  // Number of taps of the modal filter after CD-II by d: floor((N-1)/d)+1.
  function automatic int cd2_taps(input int n, input int d);
    return (n - 1) / d + 1;
  endfunction

  // Delay of the complementary path (Eq. 4 of the design):
  //   (floor((N-1)/D) + (floor((N-1)/D) mod 2)) * M/2
  function automatic int comp_dly(input int n, input int d, input int m);
    int f;
    f = (n - 1) / d;
    return (f + (f % 2)) * (m / 2);
  endfunction

  // Full-precision Q2.30 value to a saturated Q1.15 sample.
  function automatic sample_t quant(input acc_t v);
    acc_t s;
    s = v >>> FRAC;
    if (s > acc_t'(2**(DW-1) - 1))       return sample_t'(2**(DW-1) - 1);
    else if (s < -acc_t'(2**(DW-1)))     return sample_t'(-(2**(DW-1)));
    else                                 return sample_t'(s);
  endfunction

endpackage
