// Complex transversal (FIR) filter, used both as the channel matched filter
// and as the feedforward filter of the CMF-DFE.
//
// On every input strobe the new complex sample enters a tap delay line and the
// filter forms y[n] = sum_{j=0}^{N-1} c[j] * x[n-j] with full-precision complex
// products. The sum is scaled by an arithmetic right shift set at run time
// (the training engine picks it so the coefficients' scale is removed) and
// saturated to OUT_W bits. The output register is loaded one clock after the
// input strobe, so throughput is one sample per clock and latency is one clock.
// `clear` empties the delay line (start of a new packet).
//
// The filter lengths (5 taps) and the truncated coefficient width (8 bits)
// come from the design's training scheme; the run-time shift, truncating
// shift and saturation are this design's own choices.
module cfir #(
  parameter int unsigned IN_W  = 10,
  parameter int unsigned C_W   = 8,
  parameter int unsigned OUT_W = 12,
  parameter int unsigned N     = 5,
  parameter int unsigned SH_W  = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  input  logic signed [C_W-1:0]   c_re [N],
  input  logic signed [C_W-1:0]   c_im [N],
  input  logic [SH_W-1:0]         shift,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im
);
  localparam int unsigned PROD_W = IN_W + C_W + 1;
  localparam int unsigned ACC_W  = PROD_W + $clog2(N) + 1;

  // Past samples x[n-1] .. x[n-N+1]
  logic signed [IN_W-1:0] dl_re [N-1];
  logic signed [IN_W-1:0] dl_im [N-1];
  logic signed [ACC_W-1:0] acc_re, acc_im, sh_re, sh_im;

  // Tap j multiplies x[n-j]; x[n] is the input itself
  always_comb begin
    acc_re = '0;
    acc_im = '0;
    for (int j = 0; j < N; j++) begin
      logic signed [IN_W-1:0] xr, xi;
      xr = (j == 0) ? in_re : dl_re[j-1];
      xi = (j == 0) ? in_im : dl_im[j-1];
      acc_re += ACC_W'(c_re[j] * xr) - ACC_W'(c_im[j] * xi);
      acc_im += ACC_W'(c_re[j] * xi) + ACC_W'(c_im[j] * xr);
    end
    sh_re = acc_re >>> shift;
    sh_im = acc_im >>> shift;
  end

  function automatic logic signed [OUT_W-1:0] sat(input logic signed [ACC_W-1:0] v);
    localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((1 <<< (OUT_W-1)) - 1);
    localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(1 <<< (OUT_W-1));
    if (v > MAXV) return MAXV[OUT_W-1:0];
    if (v < MINV) return MINV[OUT_W-1:0];
    return v[OUT_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N-1; j++) begin
        dl_re[j] <= '0;
        dl_im[j] <= '0;
      end
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else if (clear) begin
      for (int j = 0; j < N-1; j++) begin
        dl_re[j] <= '0;
        dl_im[j] <= '0;
      end
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dl_re[0] <= in_re;
        dl_im[0] <= in_im;
        for (int j = 1; j < N-1; j++) begin
          dl_re[j] <= dl_re[j-1];
          dl_im[j] <= dl_im[j-1];
        end
        out_re <= sat(sh_re);
        out_im <= sat(sh_im);
      end
    end
  end
endmodule
