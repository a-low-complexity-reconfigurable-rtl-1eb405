// tb_nufb_top: end-to-end test of the filter bank at its full size
// (N = 276, M = 8, D = 3..7, all parameters at their defaults).
//
// Modal coefficients are computed here as a Hamming-windowed sinc:
//   h[n] = fc * sinc(fc * (n - 137.5)) * (0.54 - 0.46 cos(2 pi n / 275)),
//   n = 0..275, fc = (Fpass + Fstop)/2 relative to Fs/2,
// quantised to round(h * 2^15). Filter A: Fpass 0.083, Fstop 0.115;
// filter B: Fpass 0.067, Fstop 0.1 (the two modal filters of the design
// example). Only h[0..137] are written into the LUT.
//
// Phases:
//  1. load filter A; for every D = 3..7 on both paths stream noise, let
//     the chains settle, then compare all 9 bands and 7 sums bit-exactly
//     with a reference model (direct convolution of the input with the
//     CD-II filter, then the masking responses built by modulation, then
//     lists of adjacent bands), under several Sel_band values;
//  2. architecture-level mode (D = 3 modal, D = 7 complementary): bands are
//     checked bit-exactly and comb_valid must be low;
//  3. reload the LUT with filter B (coefficient reconfiguration) and check;
//  4. uniform mode (D = 6): a tone at the centre of each band k must come
//     out of band k with at least 10 dB more power than any other band.
// Every mechanism (each D, unequal D, reload, mirror, wide, narrow and centre
// sums, in_valid gaps, tone extraction) is counted; one that never
// happened counts as a failure. Latency from in_valid to out_valid is
// checked to be 4 clocks.
module tb_nufb_top;
  import fb_pkg::*;
  localparam int N = 276, M = 8, NH = 138, SW = DW + 3;
  localparam int ND_EXP [5] = '{368, 272, 224, 184, 160};
  localparam int SETTLE = 728 + 368 + 70;

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
  // mechanism counters
  int n_d [5];
  int n_arch = 0, n_reload = 0, n_mirror = 0, n_wide = 0, n_narrow = 0;
  int n_gap = 0, n_tone = 0, n_centre = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  int h [N];                 // modal filter, full length
  longint mresp [9][65];     // masking response per band
  longint xh [$], ah [$], ch [$];   // input, modal and complementary history

  function automatic longint q15(longint v);
    longint s;
    s = (v >= 0) ? v / 32768 : -((-v + 32767) / 32768);
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return s;
  endfunction

  function automatic longint hist(ref longint hq [$], input int j);
    return (j < hq.size()) ? hq[hq.size() - 1 - j] : 0;
  endfunction

  function automatic longint chain(int d);
    longint s = 0;
    for (int k = 0; k * d <= N - 1; k++) s += longint'(h[k * d]) * hist(xh, k * M);
    return s * d;
  endfunction

  function automatic void design_modal(real fp, real fs);
    real fc, t, v, w;
    fc = (fp + fs) / 2.0;
    for (int n = 0; n < N; n++) begin
      t = real'(n) - 137.5;
      v = fc * $sin(3.14159265358979 * fc * t) / (3.14159265358979 * fc * t);
      w = 0.54 - 0.46 * $cos(2.0 * 3.14159265358979 * n / 275.0);
      h[n] = int'($floor(v * w * 32768.0 + 0.5));
    end
    // exact symmetry (rounding of the two halves may differ in the last bit)
    for (int n = NH; n < N; n++) h[n] = h[N - 1 - n];
  endfunction

  function automatic void design_masks();
    for (int n = 0; n < 65; n++) begin
      longint h1, h2, h3, h4, sg, cs;
      h1 = H1_HALF[(n < 64 - n) ? n : 64 - n];
      h3 = H3_HALF[(n < 64 - n) ? n : 64 - n];
      h2 = (n >= 22 && n < 43) ? H2_HALF[(n - 22 < 42 - n) ? n - 22 : 42 - n] : 0;
      h4 = (n >= 22 && n < 43) ? H4_HALF[(n - 22 < 42 - n) ? n - 22 : 42 - n] : 0;
      sg = (n % 2 == 0) ? 1 : -1;
      cs = (n % 4 == 0) ? 2 : (n % 4 == 2) ? -2 : 0;
      mresp[0][n] = h1;
      mresp[8][n] = sg * h1;
      mresp[4][n] = cs * h1;
      mresp[2][n] = h2 - h1;
      mresp[6][n] = sg * (h2 - h1);
      mresp[3][n] = h3;
      mresp[5][n] = sg * h3;
      mresp[1][n] = h4;
      mresp[7][n] = sg * h4;
    end
  endfunction

  function automatic longint mfir(int b);
    longint s = 0;
    for (int n = 0; n < 65; n++)
      s += mresp[b][n] * ((b % 2 == 0) ? hist(ah, n) : hist(ch, n));
    return q15(s);
  endfunction

  typedef struct {
    longint b [N_BANDS];
    longint v [7];
    bit     en;
    bit     chk;
  } exp_t;
  exp_t q [$];

  function automatic longint bsum(int l [$], longint b [N_BANDS], bit mir);
    longint s = 0;
    foreach (l[i]) s += b[mir ? 8 - l[i] : l[i]];
    return s;
  endfunction

  // one new input sample: advance the model and queue what must come out
  function automatic void model_step(longint xv, bit chk);
    exp_t e;
    int dm, dc, d1 [$], hd [$], c1 [$];
    bit m;
    dm = 3 + $clog2(sel_modal);
    dc = 3 + $clog2(sel_comp);
    xh.push_back(xv);
    ah.push_back(q15(chain(dm)));
    ch.push_back(q15(hist(xh, ND_EXP[dc - 3]) * 32768 - chain(dc)));
    for (int k = 0; k < N_BANDS; k++) e.b[k] = mfir(k);
    m = sel_band[0];
    case (sel_band[2:1])
      2'b00: d1 = '{2};
      2'b01: d1 = '{2, 3};
      2'b10: d1 = '{2, 3, 4};
      2'b11: d1 = '{3, 4};
    endcase
    if (sel_band[3]) begin
      if (sel_band[2:1] == 2'b11) hd = sel_band[4] ? '{5, 6} : '{5};
      else                        hd = sel_band[4] ? '{0, 1} : '{1};
    end
    c1 = sel_band[5] ? '{6, 7, 8} : '{5, 6, 7, 8};
    e.v[0] = bsum({hd, d1}, e.b, m);
    e.v[1] = bsum(c1, e.b, m);
    e.v[2] = bsum('{0, 1}, e.b, m);
    e.v[3] = bsum('{7, 8}, e.b, m);
    e.v[4] = bsum(d1, e.b, m);
    e.v[5] = bsum('{2, 3}, e.b, m);
    e.v[6] = bsum('{5, 6}, e.b, m);
    e.en = (sel_modal == sel_comp);
    e.chk = chk;
    // trim histories
    if (xh.size() > 800) void'(xh.pop_front());
    if (ah.size() > 100) void'(ah.pop_front());
    if (ch.size() > 100) void'(ch.pop_front());
    q.push_back(e);
  endfunction

  // --------------------------------------------------------- output check
  real pw [N_BANDS];     // band powers for the tone test
  bit  meas = 0;
  int  lat_cnt [$];      // cycle stamps of inputs, for the latency check
  int  cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    longint got [7];
    int t0;
    e = q.pop_front();
    t0 = lat_cnt.pop_front();
    checks++;
    if (cyc - t0 != 4) begin
      failures++;
      if (failures < 10) $display("latency %0d, expected 4", cyc - t0);
    end
    if (meas) for (int k = 0; k < N_BANDS; k++) pw[k] += real'(band[k]) * real'(band[k]);
    if (e.chk) begin
      for (int k = 0; k < N_BANDS; k++) begin
        checks++;
        if (longint'(band[k]) != e.b[k]) begin
          failures++;
          if (failures < 10) $display("band %0d got %0d want %0d (sel %b/%b)", k, band[k], e.b[k], sel_modal, sel_comp);
        end
      end
      checks++;
      if (comb_valid != e.en) begin
        failures++;
        $display("comb_valid %0b, expected %0b", comb_valid, e.en);
      end
      if (e.en) begin
        got = '{comb, comb1, comb_up1, comb_up2, comb_down1, comb_down2, comb_down3};
        for (int i = 0; i < 7; i++) begin
          checks++;
          if (got[i] != e.v[i]) begin
            failures++;
            if (failures < 10) $display("sum %0d got %0d want %0d", i, got[i], e.v[i]);
          end
        end
      end
    end
  end

  // ------------------------------------------------------------- stimulus
  task automatic send(longint xv, bit chk);
    x = sample_t'(xv);
    in_valid = 1;
    model_step(xv, chk);
    lat_cnt.push_back(cyc);
    @(posedge clk); #1;
    in_valid = 0;
    if ($urandom_range(0, 9) == 0) begin
      n_gap++;
      @(posedge clk); #1;
    end
  endtask

  function automatic longint noise();
    // sum of four uniforms: roughly Gaussian, std about 0.1 of full scale
    int s = 0;
    for (int i = 0; i < 4; i++) s += $signed($urandom_range(0, 6000)) - 3000;
    return longint'(s);
  endfunction

  task automatic drain();
    repeat (6) @(posedge clk);
    #1;
  endtask

  task automatic load_coefs();
    for (int i = 0; i < NH; i++) begin
      coef_we = 1;
      coef_addr = 8'(i);
      coef_wdata = coef_t'(h[i]);
      @(posedge clk); #1;
    end
    coef_we = 0;
  endtask

  // stream noise: settle, then check under a few Sel_band settings
  task automatic noise_run(int checked);
    for (int n = 0; n < SETTLE; n++) send(noise(), 1'b0);
    for (int s = 0; s < 4; s++) begin
      drain();
      sel_band = 6'($urandom);
      if (sel_band[0]) n_mirror++;
      if (sel_band[3] && sel_band[2:1] != 2'b11 && sel_band[4]) n_wide++;
      if (sel_band[5]) n_narrow++;
      if (sel_band[3] && sel_band[2:1] == 2'b11) n_centre++;
      for (int n = 0; n < checked / 4; n++) send(noise(), 1'b1);
    end
  endtask

  initial begin
    design_masks();
    design_modal(0.083, 0.115);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    load_coefs();

    // 1. every D on both paths (filter-level reconfiguration)
    for (int d = 3; d <= 7; d++) begin
      sel_modal = 5'(1 << (d - 3));
      sel_comp  = sel_modal;
      noise_run(200);
      n_d[d - 3]++;
    end

    // 2. architecture-level reconfiguration
    sel_modal = 5'b00001;
    sel_comp  = 5'b10000;
    noise_run(200);
    n_arch++;

    // 3. reload the LUT with modal filter B
    design_modal(0.067, 0.1);
    load_coefs();
    n_reload++;
    sel_modal = 5'b00100;
    sel_comp  = 5'b00100;
    noise_run(200);

    // 4. uniform bank (D = 6, filter A): tone at each band centre
    design_modal(0.083, 0.115);
    load_coefs();
    sel_modal = 5'b01000;
    sel_comp  = 5'b01000;
    for (int k = 0; k < N_BANDS; k++) begin
      real ratio;
      int best;
      for (int n = 0; n < SETTLE + 512; n++) begin
        real ph;
        ph = 3.14159265358979 * real'(k) / 8.0 * real'(n) + 0.3;
        if (n == SETTLE) begin
          drain();
          foreach (pw[i]) pw[i] = 0.0;
          meas = 1;
        end
        send(longint'($floor(12000.0 * $cos(ph) + 0.5)), n >= SETTLE);
      end
      drain();
      meas = 0;
      ratio = 1.0e30;
      for (int i = 0; i < N_BANDS; i++)
        if (i != k && pw[k] / (pw[i] + 1.0) < ratio) begin
          ratio = pw[k] / (pw[i] + 1.0);
          best = i;
        end
      $display("tone in band %0d: nearest other band %0d is %0.1f dB lower",
               k, best, 10.0 * $log10(ratio));
      checks++;
      if (ratio < 10.0) failures++;
      else n_tone++;
    end

    drain();
    // every mechanism must have happened
    for (int d = 0; d < 5; d++) begin checks++; if (n_d[d] == 0) failures++; end
    checks += 7;
    if (n_arch == 0)   failures++;
    if (n_reload == 0) failures++;
    if (n_mirror == 0) failures++;
    if (n_wide == 0)   failures++;
    if (n_narrow == 0) failures++;
    if (n_centre == 0) failures++;
    if (n_gap == 0)    failures++;
    if (n_tone != N_BANDS) failures++;
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d outputs missing", q.size());
    end
    $display("mechanisms: D3..7 %0d %0d %0d %0d %0d, unequal D %0d, reload %0d, mirror %0d, wide %0d, narrow %0d, centre %0d, gaps %0d, tones %0d",
             n_d[0], n_d[1], n_d[2], n_d[3], n_d[4], n_arch, n_reload, n_mirror, n_wide, n_narrow, n_centre, n_gap, n_tone);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
