// Self-checking testbench for fb_coef. Random feedforward coefficients and
// Hermitian matched channel responses are applied; the testbench builds the
// full two-sided response q[-4..4], convolves it with w, and checks the
// cursor p[6] and the scaled, saturated postcursors p[7..12], one clock after
// start. Large and small shifts are used so that saturation is exercised.
module tb_fb_coef;
  import cmfdfe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, done;
  logic signed [COEF_W-1:0] w_re [NTAP], w_im [NTAP];
  logic signed [ACF_W-1:0]  q_re [NTAP], q_im [NTAP];
  logic [4:0] shift;
  logic signed [COEF_W-1:0] b_re [NFB], b_im [NFB];
  logic signed [COEF_W+ACF_W+$clog2(NTAP)+1:0] cursor_re, cursor_im;

  fb_coef dut (.*);

  int checks = 0, failures = 0, nsat = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic longint sat(longint v);
    if (v > 127) return 127;
    if (v < -127) return -127;
    return v;
  endfunction

  initial begin
    start = 0; shift = 0;
    for (int i = 0; i < NTAP; i++) begin w_re[i] = 0; w_im[i] = 0; q_re[i] = 0; q_im[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      longint qfr [9], qfi [9], pr [13], pi [13];
      for (int i = 0; i < NTAP; i++) begin
        w_re[i] = COEF_W'($urandom); w_im[i] = COEF_W'($urandom);
        q_re[i] = ACF_W'($urandom_range(0, 100000) - 50000);
        q_im[i] = (i == 0) ? '0 : ACF_W'($urandom_range(0, 100000) - 50000);
      end
      q_re[0] = ACF_W'($urandom_range(100000, 160000));
      shift = 5'(t % 2 ? $urandom_range(16, 22) : $urandom_range(10, 16));
      for (int m = -4; m <= 4; m++) begin
        qfr[m+4] = (m >= 0) ? q_re[m] : q_re[-m];
        qfi[m+4] = (m >= 0) ? q_im[m] : -longint'(q_im[-m]);
      end
      // p = w convolved with q: p[k] = sum_j w[j] q[k-j-4]
      for (int k = 0; k < 13; k++) begin
        pr[k] = 0; pi[k] = 0;
        for (int j = 0; j < NTAP; j++) begin
          int m;
          m = k - j - 4;
          if (m >= -4 && m <= 4) begin
            pr[k] += w_re[j] * qfr[m+4] - w_im[j] * qfi[m+4];
            pi[k] += w_re[j] * qfi[m+4] + w_im[j] * qfr[m+4];
          end
        end
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      check(done, "done");
      check(cursor_re == pr[6] && cursor_im == pi[6], "cursor");
      for (int i = 0; i < NFB; i++) begin
        check(b_re[i] == COEF_W'(sat(pr[7+i] >>> shift)) &&
              b_im[i] == COEF_W'(sat(pi[7+i] >>> shift)), $sformatf("b[%0d]", i));
        if (sat(pr[7+i] >>> shift) != (pr[7+i] >>> shift)) nsat++;
      end
      @(negedge clk);
      check(!done, "single done pulse");
    end
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
