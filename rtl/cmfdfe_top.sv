// HIPERLAN/1 CMF-DFE receiver datapath with an external training engine.
//
// The 2x oversampled complex baseband input first goes through phase_select,
// which keeps the even or the odd sample stream, whichever has more energy.
// The T-spaced stream feeds, at the same time,
//  * channel_est, which correlates the first training PN sequence over 16
//    lags and returns the 5-tap channel window of largest energy and its lag
//    (the frame synchronisation offset `sync`), and
//  * eq_filter, the real-time equaliser filter (matched filter, feedforward
//    filter, decision feedback) running at one symbol per clock.
// When the estimate is ready, cmf_coef turns it into the truncated matched
// filter coefficients, which are loaded into eq_filter at once, and into the
// matched channel response q, which is handed to the training engine
// (acf_valid). The training engine solves the 5x5 Toeplitz system built from
// q for the feedforward coefficients and writes them back (w_load). The same
// strobe loads them into eq_filter and starts fb_coef, which convolves them
// with q and loads the postcursors as feedback coefficients one clock later.
// From then on every input symbol yields a QPSK decision; `dec_sym` is the
// frame-synchronised index of the decided symbol (0 = first training symbol).
//
// `gmsk_mode`, sampled at `start`, selects the 62-symbol correlation needed
// for GMSK (only half of the PN chips reach each rail) instead of the
// 31-symbol one that suffices for QPSK.
//
// Interface timing: `start` marks a new packet; the next ADC sample is the
// even sample of the first training symbol (coarse timing, within the
// correlator's 16-symbol search range). The selected stream lags the ADC by
// MEAS_LEN symbols. Each decision leaves 3 clocks after its newest input.
//
// The split between a DSP training engine and a hardware equaliser filter,
// the training steps and the coefficient truncation follow the design; doing
// the channel estimate, matched coefficients and feedback coefficients in
// hardware next to the filter is this design's own partitioning, which leaves
// only the Toeplitz solve to software.
module cmfdfe_top
  import cmfdfe_pkg::*;
#(
  parameter int unsigned MEAS_LEN = PN_LEN,
  parameter int unsigned SH_W     = 5
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  gmsk_mode,
  input  logic                  adc_valid,
  input  sample_t               adc_sample,
  // to the training engine
  output logic                  phase_decided,
  output logic                  odd_sel,
  output logic [2*SAMPLE_W+$clog2(MEAS_LEN):0] energy_even,
  output logic [2*SAMPLE_W+$clog2(MEAS_LEN):0] energy_odd,
  output logic [2*EST_W+2:0]    win_energy,
  output logic                  est_busy,
  output logic                  est_valid,
  output logic [$clog2(NLAG)-1:0] sync,
  output est_t                  h_est [NTAP],
  output logic                  acf_valid,
  output logic [$clog2(EST_W)-1:0] est_shift,
  output acf_t                  q [NTAP],
  // from the training engine
  input  logic [SH_W-1:0]       cmf_shift,
  input  logic [SH_W-1:0]       ff_shift,
  input  logic [SH_W-1:0]       fb_shift,
  input  logic                  w_load,
  input  coef_t                 w_in [NTAP],
  output logic                  coef_ready,
  output logic signed [COEF_W+ACF_W+$clog2(NTAP)+1:0] cursor_re,
  output logic signed [COEF_W+ACF_W+$clog2(NTAP)+1:0] cursor_im,
  // equalised output
  output logic                  dec_valid,
  output qpsk_t                 dec,
  output logic signed [Y_W+1:0] soft_re,
  output logic signed [Y_W+1:0] soft_im,
  output logic signed [16:0]    dec_sym
);
  localparam int CUR = (NTAP-1) + (NTAP-1)/2;

  // ---------------- phase selection
  logic    sym_valid;
  sample_t sym;

  phase_select #(.MEAS_LEN(MEAS_LEN)) u_ps (
    .clk, .rst_n, .start,
    .in_valid(adc_valid), .in_sample(adc_sample),
    .out_valid(sym_valid), .out_sample(sym),
    .decided(phase_decided), .odd_sel,
    .energy_even, .energy_odd);

  // ---------------- channel estimation
  logic signed [EST_W-1:0] h_re [NTAP], h_im [NTAP];

  channel_est u_est (
    .clk, .rst_n, .start, .long_corr(gmsk_mode),
    .in_valid(sym_valid), .in_sample(sym),
    .busy(est_busy), .done(est_valid), .sync,
    .h_re, .h_im, .win_energy);

  // ---------------- matched coefficients
  logic signed [COEF_W-1:0] g_re [NTAP], g_im [NTAP];
  logic signed [ACF_W-1:0]  q_re [NTAP], q_im [NTAP];
  logic                     cmf_done, g_load;
  coef_t                    g_pack [NTAP];

  cmf_coef u_cmf (
    .clk, .rst_n, .start(est_valid),
    .h_re, .h_im,
    .shift(est_shift), .g_re, .g_im, .q_re, .q_im,
    .done(cmf_done));

  // g is valid the clock after est_valid
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) g_load <= 1'b0;
    else        g_load <= est_valid && !start;
  end
  assign acf_valid = cmf_done;

  always_comb begin
    for (int i = 0; i < NTAP; i++) begin
      h_est[i]  = '{re: h_re[i], im: h_im[i]};
      q[i]      = '{re: q_re[i], im: q_im[i]};
      g_pack[i] = '{re: g_re[i], im: g_im[i]};
    end
  end

  // ---------------- feedback coefficients
  logic signed [COEF_W-1:0] w_re [NTAP], w_im [NTAP];
  logic signed [COEF_W-1:0] b_re [NFB], b_im [NFB];
  logic                     fb_done;
  coef_t                    b_pack [NFB];

  always_comb begin
    for (int i = 0; i < NTAP; i++) begin
      w_re[i] = w_in[i].re;
      w_im[i] = w_in[i].im;
    end
    for (int i = 0; i < NFB; i++) b_pack[i] = '{re: b_re[i], im: b_im[i]};
  end

  fb_coef #(.SH_W(SH_W)) u_fb (
    .clk, .rst_n, .start(w_load),
    .w_re, .w_im, .q_re, .q_im, .shift(fb_shift),
    .b_re, .b_im, .cursor_re, .cursor_im,
    .done(fb_done));

  // ---------------- equaliser filter
  logic [15:0] dec_index;

  eq_filter #(.SH_W(SH_W)) u_eq (
    .clk, .rst_n, .flush(start),
    .g_load, .g_in(g_pack), .cmf_shift_in(cmf_shift),
    .w_load, .w_in, .ff_shift_in(ff_shift),
    .b_load(fb_done), .b_in(b_pack),
    .coef_ready,
    .in_valid(sym_valid), .in_sample(sym),
    .dec_valid, .dec, .soft_re, .soft_im, .dec_index);

  // Frame synchronisation: the decision leaving with input n is symbol
  // n - CUR - sync of the packet
  assign dec_sym = signed'({1'b0, dec_index}) - 17'(CUR) - 17'(sync);
endmodule
