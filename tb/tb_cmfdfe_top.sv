// End-to-end testbench for cmfdfe_top at its default sizes.
//
// Each packet is a 450-symbol training section (the 31-chip PN sequence as
// +-1 symbols, repeated) followed by a 496-symbol QPSK information section,
// sent through a random 5-tap complex multipath channel with a random delay of
// 0..8 symbols and sampled twice per symbol: one phase carries the symbol-
// spaced channel output, the other a half-way (weaker) interpolation.
// Packets alternate the good phase between even and odd.
//
// The testbench plays the training engine: when the matched channel
// response q is reported it solves a 5x5 system for the feedforward taps
// (precursors p[0..5] -> 0, cursor p[6] -> 1) by Gauss elimination in floating
// point (least squares with a small noise term), truncates w to 8 bits, picks the scaling shifts and writes w back.
// It then checks, for every information symbol, that the decision carrying
// that symbol's frame index equals the transmitted symbol, which checks the
// equaliser, the frame synchronisation and the pipeline latency together.
// It also checks the phase choice and the sync lag against the channel delay,
// and counts the mechanisms exercised: even and odd phase choice, non-zero
// window lag, non-zero normalisation shift, decisions held back before the
// coefficients are loaded, non-zero feedback correction, and both the 62-
// and the 31-symbol correlation (GMSK and QPSK training modes).
module tb_cmfdfe_top;
  import cmfdfe_pkg::*;
  localparam int NTRAIN = 450, NINFO = 496, NSYM = NTRAIN + NINFO;
  localparam int NPKT = 6;
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
  int m_even = 0, m_odd = 0, m_lag = 0, m_shift = 0, m_gated = 0, m_fb = 0;
  int sym_re [NSYM], sym_im [NSYM];
  int chip [PN_LEN];
  bit seen [NSYM];
  bit dsp_done;
  int pkt_dly;
  real corr_len;
  int m_qpsk = 0, m_gmsk = 0;

  initial begin
    repeat (400000) @(posedge clk);
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
        check(dec.re_neg == (sym_re[n] < 0) && dec.im_neg == (sym_im[n] < 0),
              $sformatf("decision for symbol %0d", n));
      end
    end
  end

  // ------------------------------------------------------------ one packet
  task automatic packet(int pk);
    int hr [NTAP], hi [NTAP], dly;
    int rr [NSYM+NTAIL+1], ri [NSYM+NTAIL+1];
    bit odd_good;
    int held;
    dly = $urandom_range(0, 8);
    pkt_dly = dly;
    odd_good = pk % 2;
    // decaying multipath profile, first tap strongest
    for (int i = 0; i < NTAP; i++) begin
      int a; a = 110 >> i;
      hr[i] = $urandom_range(0, 2*a) - a; hi[i] = $urandom_range(0, 2*a) - a;
    end
    hr[0] = 120 + $urandom_range(0, 30);
    for (int n = 0; n < NSYM; n++) begin
      if (n < NTRAIN) begin sym_re[n] = chip[n % PN_LEN]; sym_im[n] = 0; end
      else begin sym_re[n] = $urandom_range(0, 1) ? 1 : -1; sym_im[n] = $urandom_range(0, 1) ? 1 : -1; end
      seen[n] = 0;
    end
    for (int n = 0; n <= NSYM+NTAIL; n++) begin
      rr[n] = 0; ri[n] = 0;
      for (int i = 0; i < NTAP; i++) begin
        int s; s = n - dly - i;
        if (s >= 0 && s < NSYM) begin
          rr[n] += hr[i]*sym_re[s] - hi[i]*sym_im[s];
          ri[n] += hr[i]*sym_im[s] + hi[i]*sym_re[s];
        end else if (s < 0) begin
          // the training sequence is periodic, so it also precedes symbol 0
          rr[n] += hr[i]*chip[((s % int'(PN_LEN)) + int'(PN_LEN)) % int'(PN_LEN)];
          ri[n] += hi[i]*chip[((s % int'(PN_LEN)) + int'(PN_LEN)) % int'(PN_LEN)];
        end
      end
    end
    dsp_done = 0;
    cur_pkt = pk; eye_min[pk] = 1.0e9; eye_max[pk] = 0;
    gmsk_mode = (pk / 2) % 2 == 0;
    corr_len = gmsk_mode ? 62.0 : 31.0;
    if (gmsk_mode) m_gmsk++; else m_qpsk++;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    fork
      training_engine();
    join_none
    held = 0;
    // the channel output, including the tail of the last symbols, then silence
    for (int n = 0; n < NSYM + NTAIL; n++) begin
      sample_t good, mid;
      good.re = SAMPLE_W'(rr[n]); good.im = SAMPLE_W'(ri[n]);
      mid.re = SAMPLE_W'((rr[n] + rr[n+1]) / 2); mid.im = SAMPLE_W'((ri[n] + ri[n+1]) / 2);
      adc_valid = 1; adc_sample = odd_good ? mid : good;
      @(negedge clk);
      adc_sample = odd_good ? good : mid;
      @(negedge clk);
      if (!coef_ready && !dec_valid && n > 2*PN_LEN) held++;
    end
    adc_valid = 0;
    repeat (10) @(negedge clk);
    check(dsp_done, "training engine finished");
    check(odd_sel == odd_good, "phase choice");
    // the window must hold the strongest (first) path; with a weak last path
    // the correlation sidelobes may move it one lag earlier
    check(sync <= 4'(dly) && 4'(dly) - sync <= 1, $sformatf("sync %0d for channel delay %0d", sync, dly));
    for (int n = NTRAIN; n < NSYM; n++) check(seen[n], $sformatf("symbol %0d decided", n));
    // the eye must stay open: smallest soft level above a quarter of the largest
    check(eye_min[pk] > 0.25 * eye_max[pk],
          $sformatf("eye opening %0.1f..%0.1f", eye_min[pk], eye_max[pk]));
    if (odd_sel) m_odd++; else m_even++;
    if (sync != 0) m_lag++;
    if (held > 0) m_gated++;
    $display("packet %0d: delay %0d sync %0d phase %s est_shift %0d shifts %0d/%0d/%0d eye %0.1f..%0.1f",
             pk, dly, sync, odd_sel ? "odd" : "even", est_shift, cmf_shift, ff_shift, fb_shift,
             eye_min[pk], eye_max[pk]);
  endtask

  // eye opening: soft values of information symbols, rail by rail, as
  // multiples of the rail's sign; after cancellation they cluster tightly
  real eye_min [NPKT], eye_max [NPKT];
  int cur_pkt;
  always @(negedge clk) if (rst_n && dec_valid && dec_sym >= NTRAIN && dec_sym < NSYM) begin
    real v;
    v = real'(soft_re) * (dec.re_neg ? -1.0 : 1.0);
    if (v < eye_min[cur_pkt]) eye_min[cur_pkt] = v;
    if (v > eye_max[cur_pkt]) eye_max[cur_pkt] = v;
  end

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
    for (int pk = 0; pk < NPKT; pk++) packet(pk);
    $display("mechanisms: even %0d odd %0d nonzero-lag %0d norm-shift %0d held-back %0d feedback %0d",
             m_even, m_odd, m_lag, m_shift, m_gated, m_fb);
    check(m_fb > 0, "postcursors cancelled by feedback");
    $display("correlation lengths: 62 (GMSK) %0d, 31 (QPSK) %0d", m_gmsk, m_qpsk);
    check(m_gmsk > 0 && m_qpsk > 0, "both correlation lengths used");
    check(m_even > 0, "even phase chosen");
    check(m_odd > 0, "odd phase chosen");
    check(m_lag > 0, "non-zero window lag");
    check(m_shift > 0, "estimate normalised");
    check(m_gated > 0, "decisions held back before coefficients");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
