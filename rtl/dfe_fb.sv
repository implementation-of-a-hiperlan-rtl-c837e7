// Decision feedback section of the CMF-DFE: feedback filter plus decision device.
//
// Each feedforward output y[n] has the intersymbol interference of the
// already decided symbols removed,
//     e[n] = y[n] - sum_{k=1}^{NFB} b[k] * d[n-k],
// and is sliced to a QPSK decision d[n] = sign(Re e) + j*sign(Im e). Because a
// decision is +-1+-j, the feedback products reduce to additions and
// subtractions of the coefficient rails, so the loop closes in one clock and
// the section accepts one symbol per clock. Decision and soft output are
// registered: they appear one clock after the input strobe. The decision
// history is cleared by reset and by `flush` (start of a new packet).
//
// The feedback principle follows the CMF-DFE; the QPSK slicer (offset-QPSK
// style I/Q reception of the GMSK signal is treated as QPSK here), the 6 taps
// (postcursors of the 13-tap overall response) and the widths are this
// design's own choices. b[k] must be in the same units as y.
module dfe_fb
  import cmfdfe_pkg::*;
#(
  parameter int unsigned IN_W  = Y_W,
  parameter int unsigned C_W   = COEF_W,
  parameter int unsigned NB    = NFB
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   flush,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_re,
  input  logic signed [IN_W-1:0] in_im,
  // b[k] is stored at index k-1
  input  logic signed [C_W-1:0]  b_re [NB],
  input  logic signed [C_W-1:0]  b_im [NB],
  output logic                   out_valid,
  output qpsk_t                  dec,
  output logic signed [IN_W+1:0] soft_re,
  output logic signed [IN_W+1:0] soft_im
);
  localparam int unsigned ACC_W = IN_W + 2 + $clog2(NB);

  qpsk_t hist [NB];   // hist[k-1] = d[n-k]
  logic signed [ACC_W-1:0] fb_re, fb_im, e_re, e_im;
  qpsk_t d_now;

  always_comb begin
    fb_re = '0;
    fb_im = '0;
    for (int k = 0; k < NB; k++) begin
      // (br + j bi)(dr + j di), dr and di are +-1
      logic signed [ACC_W-1:0] br, bi;
      br = ACC_W'(b_re[k]);
      bi = ACC_W'(b_im[k]);
      fb_re += (hist[k].re_neg ? -br : br) - (hist[k].im_neg ? -bi : bi);
      fb_im += (hist[k].im_neg ? -br : br) + (hist[k].re_neg ? -bi : bi);
    end
    e_re = ACC_W'(in_re) - fb_re;
    e_im = ACC_W'(in_im) - fb_im;
    d_now.re_neg = e_re[ACC_W-1];
    d_now.im_neg = e_im[ACC_W-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NB; k++) hist[k] <= '0;
      out_valid <= 1'b0;
      dec       <= '0;
      soft_re   <= '0;
      soft_im   <= '0;
    end else if (flush) begin
      for (int k = 0; k < NB; k++) hist[k] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        hist[0] <= d_now;
        for (int k = 1; k < NB; k++) hist[k] <= hist[k-1];
        dec     <= d_now;
        soft_re <= (IN_W+2)'(e_re);
        soft_im <= (IN_W+2)'(e_im);
      end
    end
  end
endmodule
