// Workload testbench for cmfdfe_top: equalisation over random wideband
// Rayleigh fading channels with a 50 ns rms delay spread.
//
// Each packet (450 training + 496 QPSK symbols at the HIPERLAN/1 rate,
// T = 42.5 ns) passes through its own channel: NCH symbol-spaced taps, each an
// independent complex Gaussian with an exponential power profile
// E|h[i]|^2 ~ exp(-i T / 50 ns), i.e. the usual exponential delay profile
// sampled once per symbol. Taps beyond the equaliser's 5-symbol window are
// kept, so their energy acts as residual interference. Gaussian noise is added
// at snr_db (average received symbol energy over noise), and the 10-bit ADC
// clips. The SNR is swept from 10 to 30 dB in 5 dB steps, NPKT channels at
// each point. The channel has a random delay of 0..8 symbols; the second
// sample of each symbol is the half-way interpolation, and either may be
// chosen.
//
// The testbench plays the training engine as in the end-to-end test
// (least-squares 5x5 feedforward solve, 8-bit w, shifts) and counts the
// symbol errors of every information symbol, aligned by the design's own
// frame synchronisation. It checks that every information symbol is decided
// once, that the symbol error rate falls as the SNR rises, and at 20 dB that
// it stays below MAX_SER and that no more than 2 % of packets are lost
// outright (error rate above 20 %, as when a deep fade defeats the short
// feedforward filter). It prints each lost packet and the rate at each SNR. Both correlation
// lengths are used. MAX_SER is a regression bound set above the rate this
// design measures here (about 1.3 % at 20 dB, 7 taps), not a target taken
// from elsewhere.
module tb_rayleigh_50ns;
  import cmfdfe_pkg::*;
  localparam int NTRAIN = 450, NINFO = 496, NSYM = NTRAIN + NINFO;
  localparam int NPKT = 1500;        // channels, as many as in the reference's 50 ns study
  localparam int NCH = 7;                 // channel taps (symbol spaced)
  localparam real TSYM_NS = 42.5, RMS_NS = 50.0;
  localparam int NSNR = 5;              // SNR sweep: 10, 15, 20, 25, 30 dB
  localparam real MAX_SER = 0.02;      // regression bound at 20 dB; about 0.013 is measured
  real snr_db, ser_prev;
  int sym_err [NPKT];
  localparam int NTAIL = PN_LEN + 24;   // symbols sent after the packet to drain the pipeline

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, gmsk_mode, adc_valid;
  sample_t adc_sample;
  logic phase_decided, odd_sel, est_busy, est_valid, acf_valid, coef_ready, w_load;
  logic [2*SAMPLE_W+$clog2(PN_LEN):0] energy_even, energy_odd;
  logic [2*EST_W+2:0] win_energy;
  logic [3:0] sync, est_shift;
  est_t h_est [NTAP];
  acf_t q [NTAP];
  logic [4:0] cmf_shift, ff_shift, fb_shift;
  coef_t w_in [NTAP];
  logic signed [COEF_W+ACF_W+$clog2(NTAP)+1:0] cursor_re, cursor_im;
  logic dec_valid;
  qpsk_t dec;
  logic signed [Y_W+1:0] soft_re, soft_im;
  logic signed [16:0] dec_sym;

  cmfdfe_top dut (.*);

  int checks = 0, failures = 0;
  int m_even = 0, m_odd = 0, m_lag = 0, m_shift = 0, m_fb = 0;
  int sym_re [NSYM], sym_im [NSYM];
  int chip [PN_LEN];
  bit seen [NSYM];
  bit dsp_done;
  int pkt_dly;
  real corr_len;
  int m_qpsk = 0, m_gmsk = 0;

  initial begin
    repeat (NSNR * NPKT * 2200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ------------------------------------------------------------ training engine
  typedef struct { real re, im; } cplx;
  function automatic cplx cmul(cplx a, cplx b);
    cplx r; r.re = a.re*b.re - a.im*b.im; r.im = a.re*b.im + a.im*b.re; return r;
  endfunction
  function automatic cplx cdiv(cplx a, cplx b);
    cplx r; real d; d = b.re*b.re + b.im*b.im;
    r.re = (a.re*b.re + a.im*b.im)/d; r.im = (a.im*b.re - a.re*b.im)/d; return r;
  endfunction
  function automatic real rabs(real v); return (v < 0) ? -v : v; endfunction
  function automatic real cabs(cplx a); return $sqrt(a.re*a.re + a.im*a.im); endfunction
  function automatic int clog2r(real v);
    int s; s = 0;
    while (v > 1.0) begin v = v / 2.0; s++; end
    return s;
  endfunction

  task automatic training_engine();
    cplx qf [9], A [5][6], wv [5], t, p6;
    real mx, zpk, ycur;
    int s1, s2, es;
    @(negedge clk);
    while (!acf_valid) @(negedge clk);
    es = est_shift;
    for (int m = -4; m <= 4; m++) begin
      int am; am = (m < 0) ? -m : m;
      qf[m+4].re = real'(q[am].re);
      qf[m+4].im = (m < 0) ? -real'(q[am].im) : real'(q[am].im);
    end
    // Least-squares feedforward solution: precursors p[0..5] -> 0 and cursor
    // p[6] -> 1, with the noise after the matched filter (covariance = the
    // Toeplitz matrix of q) as a small regulariser:
    //   (H^H H + lambda T) w = H^H e6,   H[k][j] = q[k-j-4], k = 0..6
    begin
      cplx H [7][5];
      real lambda;
      lambda = 0.05 * qf[4].re;
      for (int k = 0; k < 7; k++)
        for (int jj = 0; jj < 5; jj++) begin
          int m; m = k - jj - 4;
          if (m >= -4 && m <= 4) H[k][jj] = qf[m+4]; else begin H[k][jj].re = 0; H[k][jj].im = 0; end
        end
      for (int r = 0; r < 5; r++) begin
        for (int c = 0; c < 5; c++) begin
          int m; m = r - c;
          A[r][c].re = lambda * qf[m+4].re; A[r][c].im = lambda * qf[m+4].im;
          for (int k = 0; k < 7; k++) begin
            cplx hc; hc.re = H[k][r].re; hc.im = -H[k][r].im;
            t = cmul(hc, H[k][c]);
            A[r][c].re += t.re; A[r][c].im += t.im;
          end
        end
        A[r][5].re = H[6][r].re; A[r][5].im = -H[6][r].im;
      end
    end
    // Gauss elimination with partial pivoting
    for (int c = 0; c < 5; c++) begin
      int p; p = c;
      for (int r = c+1; r < 5; r++) if (cabs(A[r][c]) > cabs(A[p][c])) p = r;
      for (int j = 0; j < 6; j++) begin t = A[c][j]; A[c][j] = A[p][j]; A[p][j] = t; end
      for (int r = 0; r < 5; r++) if (r != c) begin
        cplx f; f = cdiv(A[r][c], A[c][c]);
        for (int j = c; j < 6; j++) begin
          cplx pr; pr = cmul(f, A[c][j]);
          A[r][j].re -= pr.re; A[r][j].im -= pr.im;
        end
      end
    end
    mx = 0;
    for (int r = 0; r < 5; r++) begin
      wv[r] = cdiv(A[r][5], A[r][r]);
      if (rabs(wv[r].re) > mx) mx = rabs(wv[r].re);
      if (rabs(wv[r].im) > mx) mx = rabs(wv[r].im);
    end
    p6.re = 0; p6.im = 0;
    for (int j = 0; j < 5; j++) begin
      t = cmul(wv[j], qf[6-j]);
      p6.re += t.re; p6.im += t.im;
    end
    for (int j = 0; j < 5; j++) begin
      w_in[j].re = COEF_W'($rtoi(wv[j].re * 127.0 / mx));
      w_in[j].im = COEF_W'($rtoi(wv[j].im * 127.0 / mx));
    end
    // scaling: matched filter peak about 200..400; feedforward cursor about 50..100,
    // so that postcursors up to 1.27 x the cursor fit the 8-bit feedback taps
    zpk  = real'(q[0].re) * real'(1 << es) / corr_len;
    s1   = clog2r(zpk / 400.0);
    ycur = p6.re * 127.0 / mx * real'(1 << es) / corr_len;   // cursor of p in input units
    s2   = clog2r(ycur / real'(1 << s1) / 100.0);
    cmf_shift = 5'(s1);
    ff_shift  = 5'(s2);
    fb_shift  = 5'(s1 + s2 + clog2r(corr_len) - es);
    if (es > 0) m_shift++;
    // postcursors the feedback filter has to cancel: p[7..12] of w * q
    begin
      real post; post = 0;
      for (int k = 7; k <= 12; k++)
        for (int j = 0; j < 5; j++) begin
          int m; m = k - j - 4;
          if (m >= -4 && m <= 4) post += cabs(cmul(wv[j], qf[m+4]));
        end
      if (post > 0.1) m_fb++;
    end
    repeat (40) @(negedge clk);       // time the engine spends solving
    w_load = 1;
    @(negedge clk);
    w_load = 0;
    dsp_done = 1;
  endtask

  // ------------------------------------------------------------ decision monitor
  always @(negedge clk) if (rst_n) begin
    if (dec_valid) begin
      if (dec_sym >= NTRAIN && dec_sym < NSYM) begin
        int n; n = int'(dec_sym);
        check(!seen[n], "symbol decided twice");
        seen[n] = 1;
        if (dec.re_neg != (sym_re[n] < 0) || dec.im_neg != (sym_im[n] < 0))
          sym_err[cur_pkt]++;
      end
    end
  end

  // ------------------------------------------------------------ one packet
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  task automatic packet(int pk);
    real hr [NCH], hi [NCH], ptot, sig;
    int dly;
    real rr [NSYM+NTAIL+1], ri [NSYM+NTAIL+1];
    bit odd_good;
    dly = $urandom_range(0, 8);
    pkt_dly = dly;
    odd_good = pk % 2;
    // exponential power delay profile, total mean power 1, scaled so that
    // the received rms level per rail is about 150 ADC steps
    ptot = 0;
    for (int i = 0; i < NCH; i++) ptot += $exp(-real'(i) * TSYM_NS / RMS_NS);
    for (int i = 0; i < NCH; i++) begin
      real sd;
      sd = 150.0 * $sqrt($exp(-real'(i) * TSYM_NS / RMS_NS) / ptot / 2.0);
      hr[i] = sd * gauss(); hi[i] = sd * gauss();
    end
    // noise per rail: symbol energy 2 * (150^2 / 1) per complex sample / SNR
    sig = 150.0 * $sqrt(1.0 / $pow(10.0, snr_db / 10.0));
    for (int n = 0; n < NSYM; n++) begin
      if (n < NTRAIN) begin sym_re[n] = chip[n % PN_LEN]; sym_im[n] = 0; end
      else begin sym_re[n] = $urandom_range(0, 1) ? 1 : -1; sym_im[n] = $urandom_range(0, 1) ? 1 : -1; end
      seen[n] = 0;
    end
    for (int n = 0; n <= NSYM+NTAIL; n++) begin
      rr[n] = sig * gauss(); ri[n] = sig * gauss();
      for (int i = 0; i < NCH; i++) begin
        int s, sr, si;
        s = n - dly - i;
        if (s >= 0 && s < NSYM) begin sr = sym_re[s]; si = sym_im[s]; end
        else if (s < 0) begin
          // the training sequence is periodic, so it also precedes symbol 0
          sr = chip[((s % int'(PN_LEN)) + int'(PN_LEN)) % int'(PN_LEN)]; si = 0;
        end else begin sr = 0; si = 0; end
        rr[n] += hr[i]*sr - hi[i]*si;
        ri[n] += hr[i]*si + hi[i]*sr;
      end
    end
    dsp_done = 0;
    cur_pkt = pk; sym_err[pk] = 0;
    gmsk_mode = (pk / 2) % 2 == 0;
    corr_len = gmsk_mode ? 62.0 : 31.0;
    if (gmsk_mode) m_gmsk++; else m_qpsk++;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    fork
      training_engine();
    join_none
    // the channel output, including the tail of the last symbols, then silence
    for (int n = 0; n < NSYM + NTAIL; n++) begin
      sample_t good, mid;
      good.re = adc(rr[n]); good.im = adc(ri[n]);
      mid.re = adc((rr[n] + rr[n+1]) / 2.0); mid.im = adc((ri[n] + ri[n+1]) / 2.0);
      adc_valid = 1; adc_sample = odd_good ? mid : good;
      @(negedge clk);
      adc_sample = odd_good ? good : mid;
      @(negedge clk);
    end
    adc_valid = 0;
    repeat (10) @(negedge clk);
    check(dsp_done, "training engine finished");
    for (int n = NTRAIN; n < NSYM; n++) check(seen[n], $sformatf("symbol %0d decided", n));
    if (odd_sel) m_odd++; else m_even++;
    if (sync != 0) m_lag++;
    if (sym_err[pk] > NINFO / 5) $display("lost packet %0d: delay %0d sync %0d phase %s corr %0d symbol errors %0d of %0d",
             pk, dly, sync, odd_sel ? "odd" : "even", gmsk_mode ? 62 : 31, sym_err[pk], NINFO);
  endtask

  int cur_pkt;

  // 10-bit ADC: round and clip
  function automatic logic signed [SAMPLE_W-1:0] adc(real v);
    int k;
    k = $rtoi(v < 0 ? v - 0.5 : v + 0.5);
    if (k > 511) k = 511;
    if (k < -512) k = -512;
    return SAMPLE_W'(k);
  endfunction

  initial begin
    bit a [PN_LEN+5];
    for (int n = 0; n < 5; n++) a[n] = 1;
    for (int n = 0; n < PN_LEN; n++) a[n+5] = a[n+2] ^ a[n];
    for (int n = 0; n < PN_LEN; n++) chip[n] = a[n] ? -1 : 1;
    start = 0; gmsk_mode = 0; adc_valid = 0; adc_sample = '0; w_load = 0;
    cmf_shift = 0; ff_shift = 0; fb_shift = 0;
    for (int j = 0; j < NTAP; j++) w_in[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int si = 0; si < NSNR; si++) begin
      int tot, lost;
      real ser;
      snr_db = 10.0 + 5.0 * real'(si);
      for (int pk = 0; pk < NPKT; pk++) packet(pk);
      tot = 0; lost = 0;
      for (int pk = 0; pk < NPKT; pk++) begin
        tot += sym_err[pk];
        if (sym_err[pk] > NINFO / 5) lost++;
      end
      ser = real'(tot) / real'(NPKT * NINFO);
      $display("%0d channels, SNR %0.1f dB: %0d symbol errors in %0d symbols, SER %0.5f, packets lost %0d",
               NPKT, snr_db, tot, NPKT * NINFO, ser, lost);
      if (si > 0) check(ser < 1.1 * ser_prev, "error rate falls with SNR");
      ser_prev = ser;
      if (si == 2) begin
        check(ser < MAX_SER, "symbol error rate at 20 dB");
        check(lost <= NPKT / 50, "packets lost at 20 dB");
      end
    end
    $display("phase even %0d odd %0d, non-zero lag %0d, correlation 62: %0d 31: %0d",
             m_even, m_odd, m_lag, m_gmsk, m_qpsk);
    check(m_gmsk > 0 && m_qpsk > 0, "both correlation lengths used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
