// Shared widths, sizes and helper functions of the CMF-DFE equaliser.
//
// The receiver works on complex baseband samples. The sample width (10 bits)
// and the truncated coefficient width (8 bits) follow the demonstrator's ADCs
// and the coefficient resolution study; the 31-chip PN sequence, the 16-symbol
// timing uncertainty, the 62-symbol correlation for GMSK and the 5-symbol
// channel window follow the HIPERLAN/1 training scheme. The remaining widths
// (matched filter and feedforward outputs, accumulators) are this design's
// own choices, sized so that no intermediate sum can overflow.
package cmfdfe_pkg;

  // ADC sample width (10-bit ADCs on the baseband board)
  localparam int unsigned SAMPLE_W = 10;
  // Truncated equaliser coefficient width
  localparam int unsigned COEF_W   = 8;
  // Channel window, matched filter and feedforward filter length
  localparam int unsigned NTAP     = 5;
  // Number of feedback taps: postcursors of the 13-tap overall response
  localparam int unsigned NFB      = 6;
  // Timing uncertainty of the correlation search (lags)
  localparam int unsigned NLAG     = 16;
  // PN sequence period
  localparam int unsigned PN_LEN   = 31;
  // Correlation length for GMSK (two PN periods)
  localparam int unsigned CORR_LEN = 62;
  // Channel estimate width: 10-bit samples summed over 62 chips fit in 16 bits
  localparam int unsigned EST_W    = 16;
  // Autocorrelation of the truncated channel: 5 * 2 * 128^2 < 2^18
  localparam int unsigned ACF_W    = 19;
  // Matched filter output and feedforward output widths
  localparam int unsigned Z_W      = 12;
  localparam int unsigned Y_W      = 12;

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] re;
    logic signed [SAMPLE_W-1:0] im;
  } sample_t;

  typedef struct packed {
    logic signed [COEF_W-1:0] re;
    logic signed [COEF_W-1:0] im;
  } coef_t;

  typedef struct packed {
    logic signed [EST_W-1:0] re;
    logic signed [EST_W-1:0] im;
  } est_t;

  typedef struct packed {
    logic signed [ACF_W-1:0] re;
    logic signed [ACF_W-1:0] im;
  } acf_t;

  // QPSK hard decision: one sign bit per rail, 1 means -1
  typedef struct packed {
    logic re_neg;
    logic im_neg;
  } qpsk_t;

endpackage
