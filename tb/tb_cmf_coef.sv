// Self-checking testbench for cmf_coef. Random channel estimates of very
// different magnitudes (so that every normalisation shift from 0 upward is
// used) are applied; the testbench finds the shift by search, forms the
// conjugate-mirror coefficients and the autocorrelation itself, and checks
// them along with the timing: g one clock after start, q and done two clocks.
module tb_cmf_coef;
  import cmfdfe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, done;
  logic signed [EST_W-1:0] h_re [NTAP], h_im [NTAP];
  logic [3:0] shift;
  logic signed [COEF_W-1:0] g_re [NTAP], g_im [NTAP];
  logic signed [ACF_W-1:0] q_re [NTAP], q_im [NTAP];

  cmf_coef dut (.*);

  int checks = 0, failures = 0;
  int shifts_seen [16];

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

  initial begin
    start = 0;
    for (int i = 0; i < NTAP; i++) begin h_re[i] = 0; h_im[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int mag, s, hq_r [NTAP], hq_i [NTAP];
      longint qr, qi;
      mag = 1 << $urandom_range(3, 15);
      for (int i = 0; i < NTAP; i++) begin
        h_re[i] = EST_W'($urandom_range(0, 2*mag - 1) - mag);
        h_im[i] = EST_W'($urandom_range(0, 2*mag - 1) - mag);
      end
      if (t == 0) h_re[2] = -16'sd32768;
      // smallest shift giving every rail within +-127
      for (s = 0; s < EST_W; s++) begin
        bit ok;
        ok = 1;
        for (int i = 0; i < NTAP; i++)
          if ((h_re[i] >>> s) > 127 || (h_re[i] >>> s) < -127 ||
              (h_im[i] >>> s) > 127 || (h_im[i] >>> s) < -127) ok = 0;
        if (ok) break;
      end
      shifts_seen[s]++;
      for (int i = 0; i < NTAP; i++) begin
        hq_r[i] = int'(h_re[i] >>> s);
        hq_i[i] = int'(h_im[i] >>> s);
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      check(shift == 4'(s), $sformatf("shift %0d exp %0d", shift, s));
      for (int i = 0; i < NTAP; i++)
        check(g_re[i] == COEF_W'(hq_r[NTAP-1-i]) && g_im[i] == COEF_W'(-hq_i[NTAP-1-i]),
              $sformatf("g[%0d]", i));
      check(!done, "done too early");
      @(negedge clk);
      check(done, "done");
      for (int m = 0; m < NTAP; m++) begin
        qr = 0; qi = 0;
        for (int i = 0; i + m < NTAP; i++) begin
          qr += hq_r[i+m] * hq_r[i] + hq_i[i+m] * hq_i[i];
          qi += hq_i[i+m] * hq_r[i] - hq_r[i+m] * hq_i[i];
        end
        check(q_re[m] == ACF_W'(qr) && q_im[m] == ACF_W'(qi), $sformatf("q[%0d]", m));
      end
    end
    checks++;
    if (shifts_seen[0] == 0 || shifts_seen[8] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
