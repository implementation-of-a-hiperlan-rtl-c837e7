// Feedback coefficient calculation.
//
// Given the feedforward coefficients w[0..NT-1] (solved by the training
// engine) and the one-sided matched channel response q[0..NT-1]
// (q[-m] = conj(q[m])), the overall response after matched filter and
// feedforward filter is the convolution
//     p[k] = sum_j w[j] * q[k - j - (NT-1)],   k = 0 .. 3(NT-1),
// whose decision cursor is the centre of the feedforward span,
// k = CUR = (NT-1) + (NT-1)/2 (6 for 5 taps). The feedback coefficients are the
// postcursors b[i] = p[CUR+1+i], i = 0..NB-1, scaled by an arithmetic right
// shift and saturated to C_W bits so that they are in the units of the
// feedforward output. The cursor p[CUR] is also returned at full precision.
// `start` samples the inputs; b and cursor are registered and `done` pulses one
// clock after `start`.
//
// Computing the feedback taps directly from the convolution of the
// feedforward filter with the matched channel follows the CMF-DFE method; the
// cursor position, the scaling shift and the saturation are this design's
// own choices.
module fb_coef
  import cmfdfe_pkg::*;
#(
  parameter int unsigned NT   = NTAP,
  parameter int unsigned NB   = NFB,
  parameter int unsigned C_W  = COEF_W,
  parameter int unsigned Q_W  = ACF_W,
  parameter int unsigned SH_W = 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic signed [C_W-1:0]  w_re [NT],
  input  logic signed [C_W-1:0]  w_im [NT],
  input  logic signed [Q_W-1:0]  q_re [NT],
  input  logic signed [Q_W-1:0]  q_im [NT],
  input  logic [SH_W-1:0]        shift,
  output logic signed [C_W-1:0]  b_re [NB],
  output logic signed [C_W-1:0]  b_im [NB],
  output logic signed [C_W+Q_W+$clog2(NT)+1:0] cursor_re,
  output logic signed [C_W+Q_W+$clog2(NT)+1:0] cursor_im,
  output logic                   done
);
  localparam int unsigned P_W = C_W + Q_W + $clog2(NT) + 2;
  localparam int          CUR = (NT-1) + (NT-1)/2;

  // p[k] of the overall response (combinational)
  function automatic void conv_tap(input int k, output logic signed [P_W-1:0] pr,
                                   output logic signed [P_W-1:0] pi);
    pr = '0;
    pi = '0;
    for (int j = 0; j < NT; j++) begin
      int m;
      logic signed [Q_W-1:0] qr, qi;
      m = k - j - (NT-1);
      if (m > -int'(NT) && m < int'(NT)) begin
        if (m >= 0) begin
          qr = q_re[m];  qi = q_im[m];
        end else begin
          qr = q_re[-m]; qi = -q_im[-m];
        end
        pr += P_W'(w_re[j] * qr) - P_W'(w_im[j] * qi);
        pi += P_W'(w_re[j] * qi) + P_W'(w_im[j] * qr);
      end
    end
  endfunction

  function automatic logic signed [C_W-1:0] sat(input logic signed [P_W-1:0] v);
    localparam logic signed [P_W-1:0] MAXV = P_W'((1 <<< (C_W-1)) - 1);
    if (v > MAXV)  return MAXV[C_W-1:0];
    if (v < -MAXV) return -MAXV[C_W-1:0];
    return v[C_W-1:0];
  endfunction

  logic signed [P_W-1:0] p_re [NB+1];   // p[CUR] .. p[CUR+NB]
  logic signed [P_W-1:0] p_im [NB+1];

  always_comb begin
    for (int i = 0; i <= NB; i++) conv_tap(CUR + i, p_re[i], p_im[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done      <= 1'b0;
      cursor_re <= '0;
      cursor_im <= '0;
      for (int i = 0; i < NB; i++) begin
        b_re[i] <= '0; b_im[i] <= '0;
      end
    end else begin
      done <= start;
      if (start) begin
        cursor_re <= p_re[0];
        cursor_im <= p_im[0];
        for (int i = 0; i < NB; i++) begin
          b_re[i] <= sat(p_re[i+1] >>> shift);
          b_im[i] <= sat(p_im[i+1] >>> shift);
        end
      end
    end
  end
endmodule
