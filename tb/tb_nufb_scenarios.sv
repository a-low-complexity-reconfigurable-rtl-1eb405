// tb_nufb_scenarios: channel extraction tests on the full-size filter bank
// (all parameters at their defaults), one run per wideband spectrum.
//
// Each spectrum holds 3 to 5 channels with the bandwidths of the published
// functionality tests (normalised to Fs/2):
//   S1  D = 3: 0.069, 0.033, 0.15, 0.03, 0.062  (single bands 3, 8, 1, 0, 2)
//   S2  D = 5: 0.0797, 0.02, 0.04, 0.12         (bands 2, 0, 8 and 5+6)
//   S3  D = 4: 0.09, 0.1, 0.05, 0.02            (bands 0+1, 3, 6, 8)
//   S4  D = 7: 0.185, 0.041, 0.134              (bands 0+1+2, 5, 7+8)
// The channel positions are chosen here so that each channel fits the band,
// or run of adjacent bands, that extracts it.
// A channel is a set of 8 tones spread over the inner 80% of its bandwidth
// with random phases; tones that fall in a transition band of the modal
// response are left out. The expected output of a channel is the sum of its
// own tones delayed by 32 (masking filters) plus:
//  - single modal band m: the CD-II group delay floor(275/D)*M/2, with the
//    tone inverted when that length is odd and m is odd (an even-length
//    CD-II filter has the sign (-1)^m on image m);
//  - single complementary band, or a sum of bands: Nd(D) of comp_delay (the sum
//    of the modal and complementary responses is the input delayed by Nd).
// Before the spectra, band-0 is checked against the published channel
// edges for both modal filters (Fpass/Fstop 0.083/0.115 and
// 0.067/0.1) and every D: a tone at D*Fpass/M must pass within 1 dB and a
// tone at D*Fstop/M must be at least 30 dB down. Filter A stays loaded for
// the spectra.
// For every channel the normalised error
//   NMSE = sum((y - y_ref)^2) / sum(y_ref^2)
// over 4096 settled samples must be below NMSE_MAX; the measured values are
// printed.
module tb_nufb_scenarios;
  import fb_pkg::*;
  localparam int N = 276, M = 8, NH = 138, SW = DW + 3;
  localparam int SETTLE = 1200;
  localparam int NMEAS = 4096;
  localparam int NT = 8;            // tones per channel
  localparam real PI = 3.14159265358979;
  localparam real NMSE_MAX = 0.1;

  logic clk = 0, rst_n = 0;
  logic coef_we = 0;
  logic [7:0] coef_addr = '0;
  coef_t coef_wdata = '0;
  logic [4:0] sel_modal = 5'b00001, sel_comp = 5'b00001;
  logic [5:0] sel_band = '0;
  logic in_valid = 0;
  sample_t x = '0;
  logic out_valid, comb_valid;
  sample_t band [N_BANDS];
  logic signed [SW-1:0] comb, comb1, comb_up1, comb_up2, comb_down1, comb_down2, comb_down3;

  nufb_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ channels
  // out: 0..8 single band, 9 COMB, 10 COMB1, 11 COMB_UP1, 12 COMB_UP2,
  //      13 COMB_DOWN1, 14 COMB_DOWN2, 15 COMB_DOWN3
  typedef struct {
    real lo, hi;
    int  out;
  } chan_t;

  int   d_cur;
  int   n_ch;
  chan_t ch [5];
  real  tf [5][NT];     // tone frequency (fraction of Fs/2), < 0: unused
  real  tp [5][NT];     // tone phase
  real  ts [5][NT];     // tone sign
  int   td [5][NT];     // expected delay of the tone
  real  amp;

  int h [N];
  function automatic void design_modal(real fp, real fs);
    real fc, t, v, w;
    fc = (fp + fs) / 2.0;
    for (int n = 0; n < N; n++) begin
      t = real'(n) - 137.5;
      v = fc * $sin(PI * fc * t) / (PI * fc * t);
      w = 0.54 - 0.46 * $cos(2.0 * PI * n / 275.0);
      h[n] = int'($floor(v * w * 32768.0 + 0.5));
    end
  endfunction

  // Place the tones of every channel and give each its delay.
  function automatic void place_tones();
    real pass_h, stop_h, f, c, dst;
    pass_h = d_cur * 0.083 / M;
    stop_h = d_cur * 0.115 / M;
    for (int i = 0; i < n_ch; i++)
      for (int t = 0; t < NT; t++) begin
        f = ch[i].lo + (ch[i].hi - ch[i].lo) * (0.1 + 0.8 * t / (NT - 1));
        c = $floor(f * 4.0 + 0.5) / 4.0;          // nearest modal band centre
        dst = (f > c) ? f - c : c - f;
        tp[i][t] = 2.0 * PI * $urandom_range(0, 9999) / 10000.0;
        ts[i][t] = 1.0;
        td[i][t] = 32 + comp_dly(N, d_cur, M);
        if (dst <= pass_h) begin
          tf[i][t] = f;
          if (ch[i].out < 9) begin
            td[i][t] = 32 + ((N - 1) / d_cur) * M / 2;
            // even-length CD-II filter: image m has sign (-1)^m
            if (((N - 1) / d_cur) % 2 == 1 && int'($floor(f * 4.0 + 0.5)) % 2 == 1)
              ts[i][t] = -1.0;
          end
        end else if (dst >= stop_h)
          tf[i][t] = f;
        else
          tf[i][t] = -1.0;
      end
  endfunction

  function automatic real chan_val(int i, int n);
    real s = 0.0;
    for (int t = 0; t < NT; t++)
      if (tf[i][t] >= 0.0) s += ts[i][t] * amp * $cos(PI * tf[i][t] * (n - td[i][t]) + tp[i][t]);
    return s;
  endfunction

  function automatic real pick(int o);
    case (o)
      9:  return real'(comb);
      10: return real'(comb1);
      11: return real'(comb_up1);
      12: return real'(comb_up2);
      13: return real'(comb_down1);
      14: return real'(comb_down2);
      15: return real'(comb_down3);
      default: return real'(band[o]);
    endcase
  endfunction

  // ------------------------------------------------------------ capture
  int  n_out;
  real e_err [5], e_ref [5];
  bit  measuring = 0;
  bit  gmeas = 0;
  real g_pow;
  always @(negedge clk) if (rst_n && out_valid) begin
    if (gmeas && n_out >= SETTLE && n_out < SETTLE + NMEAS)
      g_pow += real'(band[0]) * real'(band[0]);
    if (measuring && n_out >= SETTLE && n_out < SETTLE + NMEAS)
      for (int i = 0; i < n_ch; i++) begin
        real r, y;
        r = chan_val(i, n_out);
        y = pick(ch[i].out);
        e_err[i] += (y - r) * (y - r);
        e_ref[i] += r * r;
      end
    n_out++;
  end

  task automatic load_coefs();
    for (int a = 0; a < NH; a++) begin
      coef_we = 1;
      coef_addr = 8'(a);
      coef_wdata = coef_t'(h[a]);
      @(posedge clk); #1;
    end
    coef_we = 0;
  endtask

  task automatic run(string name, int d, logic [5:0] sb);
    real v, nm;
    int used;
    d_cur = d;
    sel_modal = 5'(1 << (d - D_MIN));
    sel_comp = sel_modal;
    sel_band = sb;
    place_tones();
    used = 0;
    for (int i = 0; i < n_ch; i++)
      for (int t = 0; t < NT; t++) if (tf[i][t] >= 0.0) used++;
    amp = 24000.0 / used;
    for (int i = 0; i < n_ch; i++) begin
      e_err[i] = 0.0;
      e_ref[i] = 0.0;
    end
    n_out = 0;
    measuring = 1;
    for (int n = 0; n < SETTLE + NMEAS + 8; n++) begin
      v = 0.0;
      for (int i = 0; i < n_ch; i++)
        for (int t = 0; t < NT; t++)
          if (tf[i][t] >= 0.0) v += amp * $cos(PI * tf[i][t] * n + tp[i][t]);
      x = sample_t'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
      in_valid = 1;
      @(posedge clk); #1;
    end
    in_valid = 0;
    repeat (6) @(posedge clk);
    #1 measuring = 0;
    checks++;
    if (!comb_valid) begin
      failures++;
      $display("%s: comb_valid low with equal D", name);
    end
    for (int i = 0; i < n_ch; i++) begin
      nm = e_err[i] / e_ref[i];
      checks++;
      $display("%s D=%0d channel %0d (%.4f..%.4f, out %0d): NMSE %.4f",
               name, d, i + 1, ch[i].lo, ch[i].hi, ch[i].out, nm);
      if (!(nm < NMSE_MAX)) begin
        failures++;
        $display("  FAIL: NMSE above %.2f", NMSE_MAX);
      end
    end
  endtask

  // Gain (dB) of band-0 for a tone at frequency f, with D = d on both paths.
  task automatic band0_gain(int d, real f, output real db);
    real a;
    a = 16000.0;
    sel_modal = 5'(1 << (d - D_MIN));
    sel_comp = sel_modal;
    g_pow = 0.0;
    n_out = 0;
    gmeas = 1;
    for (int n = 0; n < SETTLE + NMEAS + 8; n++) begin
      x = sample_t'($rtoi(a * $cos(PI * f * n)));
      in_valid = 1;
      @(posedge clk); #1;
    end
    in_valid = 0;
    repeat (6) @(posedge clk);
    #1 gmeas = 0;
    db = 10.0 * $log10(g_pow / NMEAS / (a * a / 2.0) + 1.0e-12);
  endtask

  // Channel-edge check: band-0 of both modal filters at every D. Passband edge
  // D*Fpass/M within 1 dB; stopband edge D*Fstop/M at least 30 dB down.
  task automatic edges(string name, real fp, real fs);
    real gp, gs;
    design_modal(fp, fs);
    for (int n = NH; n < N; n++) h[n] = h[N - 1 - n];
    load_coefs();
    for (int d = D_MIN; d <= D_MAX; d++) begin
      band0_gain(d, d * fp / M, gp);
      band0_gain(d, d * fs / M, gs);
      $display("%s D=%0d band-0 pass edge %.4f: %.2f dB, stop edge %.4f: %.1f dB",
               name, d, d * fp / M, gp, d * fs / M, gs);
      checks += 2;
      if (!(gp > -1.0 && gp < 1.0)) begin
        failures++;
        $display("  FAIL: pass-edge gain outside +-1 dB");
      end
      if (!(gs < -30.0)) begin
        failures++;
        $display("  FAIL: stop-edge attenuation below 30 dB");
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    edges("filter B", 0.067, 0.1);
    edges("filter A", 0.083, 0.115);

    // S1: five channels, D = 3 on both paths, single bands
    n_ch = 5;
    ch[0] = '{0.3405, 0.4095, 3};
    ch[1] = '{0.967,  1.0,    8};
    ch[2] = '{0.05,   0.2,    1};
    ch[3] = '{0.0,    0.03,   0};
    ch[4] = '{0.219,  0.281,  2};
    run("S1", 3, 6'b000000);

    // S2: four channels, D = 5, one over bands 5+6
    n_ch = 4;
    ch[0] = '{0.21,   0.2897, 2};
    ch[1] = '{0.0,    0.02,   0};
    ch[2] = '{0.96,   1.0,    8};
    ch[3] = '{0.628,  0.748,  15};
    run("S2", 5, 6'b000000);

    // S3: four channels, D = 4, one over bands 0+1
    n_ch = 4;
    ch[0] = '{0.0,    0.09,   11};
    ch[1] = '{0.325,  0.425,  3};
    ch[2] = '{0.725,  0.775,  6};
    ch[3] = '{0.98,   1.0,    8};
    run("S3", 4, 6'b000000);

    // S4: three channels, D = 7, over bands 0+1+2, 5 and 7+8
    n_ch = 3;
    ch[0] = '{0.0,    0.185,  9};
    ch[1] = '{0.6045, 0.6455, 5};
    ch[2] = '{0.866,  1.0,    12};
    run("S4", 7, 6'b011000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
