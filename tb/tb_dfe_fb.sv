// Self-checking testbench for dfe_fb, the feedback filter and QPSK decision
// device. Random feedforward outputs and feedback coefficients are driven with
// gaps in the valid strobe and an occasional flush; a model kept here holds its
// own decision history and computes e[n] = y[n] - sum b[k] d[n-k] and the
// slicer output, which must match the registered outputs one clock later.
module tb_dfe_fb;
  import cmfdfe_pkg::*;
  localparam int IN_W = 12, C_W = 8, NB = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic flush, in_valid;
  logic signed [IN_W-1:0] in_re, in_im;
  logic signed [C_W-1:0]  b_re [NB], b_im [NB];
  logic out_valid;
  qpsk_t dec;
  logic signed [IN_W+1:0] soft_re, soft_im;

  dfe_fb #(.IN_W(IN_W), .C_W(C_W), .NB(NB)) dut (.*);

  int checks = 0, failures = 0, nflush = 0, nneg = 0, nfbbig = 0;
  int hr [NB], hi [NB];          // model history: +-1 per rail
  int exp_re, exp_im, exp_dr, exp_di;
  logic exp_pending;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; in_valid = 0; in_re = 0; in_im = 0; exp_pending = 0;
    for (int k = 0; k < NB; k++) begin b_re[k] = 0; b_im[k] = 0; hr[k] = 1; hi[k] = 1; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      checks++;
      if (exp_pending) begin
        if (!out_valid || soft_re != (IN_W+2)'(exp_re) || soft_im != (IN_W+2)'(exp_im) ||
            dec.re_neg != (exp_dr < 0) || dec.im_neg != (exp_di < 0)) begin
          failures++;
          if (failures < 10) $display("t %0d: got %0d,%0d (%0b%0b) exp %0d,%0d", t,
                                      soft_re, soft_im, dec.re_neg, dec.im_neg, exp_re, exp_im);
        end
      end else if (out_valid) failures++;
      if (t % 500 == 0) begin
        for (int k = 0; k < NB; k++) begin
          b_re[k] = C_W'($urandom); b_im[k] = C_W'($urandom);
        end
      end
      flush = (t % 1000 == 999);
      in_valid = !flush && ($urandom_range(0, 4) != 0);
      in_re = IN_W'($urandom_range(0, 1200)) - IN_W'(600);
      in_im = IN_W'($urandom_range(0, 1200)) - IN_W'(600);
      exp_pending = in_valid;
      if (flush) begin
        nflush++;
        for (int k = 0; k < NB; k++) begin hr[k] = 1; hi[k] = 1; end
      end else if (in_valid) begin
        int fr, fi;
        fr = 0; fi = 0;
        for (int k = 0; k < NB; k++) begin
          fr += b_re[k] * hr[k] - b_im[k] * hi[k];
          fi += b_re[k] * hi[k] + b_im[k] * hr[k];
        end
        exp_re = in_re - fr;
        exp_im = in_im - fi;
        // count decisions that the feedback term flipped
        if ((exp_re < 0) != (in_re < 0)) nfbbig++;
        exp_dr = (exp_re < 0) ? -1 : 1;
        exp_di = (exp_im < 0) ? -1 : 1;
        if (exp_dr < 0) nneg++;
        for (int k = NB-1; k > 0; k--) begin hr[k] = hr[k-1]; hi[k] = hi[k-1]; end
        hr[0] = exp_dr; hi[0] = exp_di;
      end
    end
    @(negedge clk);
    $display("flushes %0d, decisions changed by feedback %0d, negative %0d", nflush, nfbbig, nneg);
    checks++;
    if (nflush == 0 || nfbbig == 0 || nneg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
