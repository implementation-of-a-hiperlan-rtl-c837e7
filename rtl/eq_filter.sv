// Real-time CMF-DFE equaliser filter (the accelerator fed by the training engine).
//
// The symbol-spaced input passes the channel matched filter (NTAP complex
// taps g), the feedforward filter (NTAP taps w) and the decision feedback
// section (NFB taps b, QPSK slicer). All three run at one symbol per clock, so
// the filter sustains the full HIPERLAN/1 symbol rate at a clock equal to the
// symbol rate. Coefficients are truncated to COEF_W bits and held in a
// coefficient register bank loaded by parallel strobes (g_load, w_load,
// b_load). Both scaling shifts are taken with w_load, since the scaling is
// only known once the feedforward solution is. Decisions are marked valid
// only once all three sets have been loaded since the last `flush`.
//
// Timing: a sample strobed in at clock t gives its contribution to the
// decision strobed out at t+3 (one register in each stage); dec_index counts
// the decisions since `flush`, i.e. it is the index of the newest input
// sample that reached the decision. The decision for
// a symbol transmitted at t0 on a channel whose window starts at lag 0 leaves
// at t0 + 3 + CUR, with CUR = 6 the cursor of the overall response.
//
// The chain of matched filter, feedforward filter and feedback filter with
// decision device, and the short coefficients, follow the CMF-DFE; the load
// interface, the widths between stages and the shifts are this design's own.
module eq_filter
  import cmfdfe_pkg::*;
#(
  parameter int unsigned NT   = NTAP,
  parameter int unsigned NB   = NFB,
  parameter int unsigned SH_W = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    flush,
  // coefficient register bank
  input  logic                    g_load,
  input  coef_t                   g_in [NT],
  input  logic                    w_load,
  input  coef_t                   w_in [NT],
  input  logic [SH_W-1:0]         cmf_shift_in,
  input  logic [SH_W-1:0]         ff_shift_in,
  input  logic                    b_load,
  input  coef_t                   b_in [NB],
  output logic                    coef_ready,
  // sample stream
  input  logic                    in_valid,
  input  sample_t                 in_sample,
  output logic                    dec_valid,
  output qpsk_t                   dec,
  output logic signed [Y_W+1:0]   soft_re,
  output logic signed [Y_W+1:0]   soft_im,
  output logic [15:0]             dec_index
);
  logic signed [COEF_W-1:0] g_re [NT], g_im [NT];
  logic signed [COEF_W-1:0] w_re [NT], w_im [NT];
  logic signed [COEF_W-1:0] b_re [NB], b_im [NB];
  logic [SH_W-1:0] cmf_shift, ff_shift;
  logic g_ok, w_ok, b_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NT; i++) begin
        g_re[i] <= '0; g_im[i] <= '0; w_re[i] <= '0; w_im[i] <= '0;
      end
      for (int i = 0; i < NB; i++) begin
        b_re[i] <= '0; b_im[i] <= '0;
      end
      cmf_shift <= '0;
      ff_shift  <= '0;
      g_ok <= 1'b0; w_ok <= 1'b0; b_ok <= 1'b0;
    end else begin
      if (flush) begin
        g_ok <= 1'b0; w_ok <= 1'b0; b_ok <= 1'b0;
      end
      if (g_load) begin
        for (int i = 0; i < NT; i++) begin
          g_re[i] <= g_in[i].re; g_im[i] <= g_in[i].im;
        end
        g_ok <= 1'b1;
      end
      if (w_load) begin
        for (int i = 0; i < NT; i++) begin
          w_re[i] <= w_in[i].re; w_im[i] <= w_in[i].im;
        end
        cmf_shift <= cmf_shift_in;
        ff_shift  <= ff_shift_in;
        w_ok <= 1'b1;
      end
      if (b_load) begin
        for (int i = 0; i < NB; i++) begin
          b_re[i] <= b_in[i].re; b_im[i] <= b_in[i].im;
        end
        b_ok <= 1'b1;
      end
    end
  end

  assign coef_ready = g_ok && w_ok && b_ok;

  logic                  z_valid, y_valid, d_valid;
  logic signed [Z_W-1:0] z_re, z_im;
  logic signed [Y_W-1:0] y_re, y_im;

  cfir #(.IN_W(SAMPLE_W), .C_W(COEF_W), .OUT_W(Z_W), .N(NT), .SH_W(SH_W)) u_cmf (
    .clk, .rst_n, .clear(flush), .in_valid,
    .in_re(in_sample.re), .in_im(in_sample.im),
    .c_re(g_re), .c_im(g_im), .shift(cmf_shift),
    .out_valid(z_valid), .out_re(z_re), .out_im(z_im));

  cfir #(.IN_W(Z_W), .C_W(COEF_W), .OUT_W(Y_W), .N(NT), .SH_W(SH_W)) u_ff (
    .clk, .rst_n, .clear(flush), .in_valid(z_valid),
    .in_re(z_re), .in_im(z_im),
    .c_re(w_re), .c_im(w_im), .shift(ff_shift),
    .out_valid(y_valid), .out_re(y_re), .out_im(y_im));

  dfe_fb #(.IN_W(Y_W), .C_W(COEF_W), .NB(NB)) u_dfe (
    .clk, .rst_n, .flush, .in_valid(y_valid),
    .in_re(y_re), .in_im(y_im),
    .b_re, .b_im,
    .out_valid(d_valid), .dec, .soft_re, .soft_im);

  assign dec_valid = d_valid && coef_ready;

  // Input sample index (since flush) that each decision leaves with
  logic [15:0] out_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        out_cnt <= '0;
    else if (flush)    out_cnt <= '0;
    else if (d_valid)  out_cnt <= out_cnt + 1'b1;
  end
  assign dec_index = out_cnt;
endmodule
