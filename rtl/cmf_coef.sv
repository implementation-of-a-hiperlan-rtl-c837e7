// Matched channel coefficient calculation.
//
// From the NT-tap channel estimate h (wide correlator sums) this block forms
//  * a block-floating-point copy h' = h >>> shift, with the smallest shift
//    that brings every rail into [-(2^(C_W-1)-1), 2^(C_W-1)-1] (truncation),
//  * the channel matched filter coefficients g[i] = conj(h'[NT-1-i]), the
//    complex conjugate of the mirror image of the channel, and
//  * the one-sided autocorrelation q[m] = sum_i h'[i+m] * conj(h'[i]),
//    m = 0..NT-1, i.e. the channel as seen through its matched filter; it is
//    Hermitian (q[-m] = conj(q[m])) with the real peak q[0] at the centre.
// q builds the Toeplitz system of the feedforward solve and feeds the feedback
// coefficient calculation. `start` latches the estimate; g and shift are valid
// one clock later, q two clocks later, when `done` pulses.
//
// The conjugate-mirror rule and the truncation to a small coefficient width
// follow the CMF-DFE method; the block floating point normalisation and the
// symmetric coefficient range (which lets conj() never overflow) are this
// design's own choices.
module cmf_coef
  import cmfdfe_pkg::*;
#(
  parameter int unsigned IN_W = EST_W,
  parameter int unsigned C_W  = COEF_W,
  parameter int unsigned NT   = NTAP,
  parameter int unsigned Q_W  = ACF_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic signed [IN_W-1:0]      h_re [NT],
  input  logic signed [IN_W-1:0]      h_im [NT],
  output logic [$clog2(IN_W)-1:0]     shift,
  output logic signed [C_W-1:0]       g_re [NT],
  output logic signed [C_W-1:0]       g_im [NT],
  output logic signed [Q_W-1:0]       q_re [NT],
  output logic signed [Q_W-1:0]       q_im [NT],
  output logic                        done
);
  localparam int unsigned SHW  = $clog2(IN_W);
  localparam int              CMAX = (1 <<< (C_W-1)) - 1;

  logic signed [C_W-1:0] hq_re [NT];   // h' after normalisation
  logic signed [C_W-1:0] hq_im [NT];
  logic [SHW-1:0]        sh_c;
  logic signed [C_W-1:0] hn_re [NT];   // normalised estimate (combinational)
  logic signed [C_W-1:0] hn_im [NT];
  logic                  stage2;

  // Smallest shift that fits every rail into the symmetric coefficient range
  function automatic logic fits(input logic signed [IN_W-1:0] v, input int s);
    logic signed [IN_W-1:0] t;
    t = v >>> s;
    return (t <= IN_W'(CMAX)) && (t >= -IN_W'(CMAX));
  endfunction

  always_comb begin
    sh_c = SHW'(IN_W - C_W + 1);
    for (int s = IN_W - C_W + 1; s >= 0; s--) begin
      logic ok;
      ok = 1'b1;
      for (int i = 0; i < NT; i++)
        ok = ok && fits(h_re[i], s) && fits(h_im[i], s);
      if (ok) sh_c = SHW'(s);
    end
    // the shift guarantees the dropped upper bits are sign copies
    for (int i = 0; i < NT; i++) begin
      hn_re[i] = C_W'(h_re[i] >>> sh_c);
      hn_im[i] = C_W'(h_im[i] >>> sh_c);
    end
  end

  // q[m] = sum_i h'[i+m] * conj(h'[i])
  logic signed [Q_W-1:0] qc_re [NT], qc_im [NT];
  always_comb begin
    for (int m = 0; m < NT; m++) begin
      qc_re[m] = '0;
      qc_im[m] = '0;
      for (int i = 0; i + m < NT; i++) begin
        qc_re[m] += Q_W'(hq_re[i+m] * hq_re[i]) + Q_W'(hq_im[i+m] * hq_im[i]);
        qc_im[m] += Q_W'(hq_im[i+m] * hq_re[i]) - Q_W'(hq_re[i+m] * hq_im[i]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift  <= '0;
      stage2 <= 1'b0;
      done   <= 1'b0;
      for (int i = 0; i < NT; i++) begin
        hq_re[i] <= '0; hq_im[i] <= '0;
        g_re[i]  <= '0; g_im[i]  <= '0;
        q_re[i]  <= '0; q_im[i]  <= '0;
      end
    end else begin
      stage2 <= start;
      done   <= stage2;
      if (start) begin
        shift <= sh_c;
        for (int i = 0; i < NT; i++) begin
          hq_re[i] <= hn_re[i];
          hq_im[i] <= hn_im[i];
          g_re[NT-1-i] <= hn_re[i];
          g_im[NT-1-i] <= -hn_im[i];
        end
      end
      if (stage2) begin
        for (int m = 0; m < NT; m++) begin
          q_re[m] <= qc_re[m];
          q_im[m] <= qc_im[m];
        end
      end
    end
  end
endmodule
