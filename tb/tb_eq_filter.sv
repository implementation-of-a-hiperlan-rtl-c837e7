// Self-checking testbench for eq_filter, the matched filter / feedforward /
// decision feedback chain. Random coefficient sets and samples are driven; a
// sample-by-sample model kept here (two truncating, saturating complex FIRs
// and the feedback slicer) predicts every decision and soft value. It also
// checks that decisions are held back until all three coefficient sets are
// loaded, that `flush` clears that state and the history, that dec_index
// counts decisions, and that a decision leaves 3 clocks after its newest input.
module tb_eq_filter;
  import cmfdfe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic flush, g_load, w_load, b_load, coef_ready, in_valid, dec_valid;
  coef_t g_in [NTAP], w_in [NTAP], b_in [NFB];
  logic [4:0] cmf_shift_in, ff_shift_in;
  sample_t in_sample;
  qpsk_t dec;
  logic signed [Y_W+1:0] soft_re, soft_im;
  logic [15:0] dec_index;

  eq_filter dut (.*);

  int checks = 0, failures = 0, n_gated = 0, n_dec = 0, n_flush = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // model state
  longint xr [$], xi [$], zr [$], zi [$];
  int hr [NFB], hi [NFB];
  int g_r [NTAP], g_i [NTAP], w_r [NTAP], w_i [NTAP], b_r [NFB], b_i [NFB], s1, s2;
  typedef struct { longint er, ei; int unsigned c; bit ready; int idx; } exp_t;
  exp_t q [$];
  int n_out;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat12(longint v);
    if (v > 2047) return 2047;
    if (v < -2048) return -2048;
    return v;
  endfunction

  task automatic model_reset();
    xr.delete(); xi.delete(); zr.delete(); zi.delete();
    for (int j = 0; j < NTAP; j++) begin
      xr.push_back(0); xi.push_back(0); zr.push_back(0); zi.push_back(0);
    end
    for (int k = 0; k < NFB; k++) begin hr[k] = 1; hi[k] = 1; end
  endtask

  // one symbol through the model; returns e = y - feedback
  task automatic model_step(longint inr, longint ini, output longint er, output longint ei);
    longint ar, ai, yr, yi, fr, fi;
    xr.push_front(inr); xi.push_front(ini); void'(xr.pop_back()); void'(xi.pop_back());
    ar = 0; ai = 0;
    for (int j = 0; j < NTAP; j++) begin
      ar += g_r[j] * xr[j] - g_i[j] * xi[j];
      ai += g_r[j] * xi[j] + g_i[j] * xr[j];
    end
    zr.push_front(sat12(ar >>> s1)); zi.push_front(sat12(ai >>> s1));
    void'(zr.pop_back()); void'(zi.pop_back());
    ar = 0; ai = 0;
    for (int j = 0; j < NTAP; j++) begin
      ar += w_r[j] * zr[j] - w_i[j] * zi[j];
      ai += w_r[j] * zi[j] + w_i[j] * zr[j];
    end
    yr = sat12(ar >>> s2); yi = sat12(ai >>> s2);
    fr = 0; fi = 0;
    for (int k = 0; k < NFB; k++) begin
      fr += b_r[k] * hr[k] - b_i[k] * hi[k];
      fi += b_r[k] * hi[k] + b_i[k] * hr[k];
    end
    er = yr - fr; ei = yi - fi;
    for (int k = NFB-1; k > 0; k--) begin hr[k] = hr[k-1]; hi[k] = hi[k-1]; end
    hr[0] = (er < 0) ? -1 : 1; hi[0] = (ei < 0) ? -1 : 1;
  endtask

  // output monitor
  always @(negedge clk) if (rst_n) begin
    if (dec_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output at %0t", $time);
      end else begin
        e = q.pop_front();
        if (cyc - e.c != 3 ||
            soft_re != (Y_W+2)'(e.er) || soft_im != (Y_W+2)'(e.ei) ||
            dec.re_neg != (e.er < 0) || dec.im_neg != (e.ei < 0) ||
            dec_index != 16'(e.idx)) begin
          failures++;
          if (failures < 10) $display("mismatch at %0t: got %0d,%0d v%0b idx %0d exp %0d,%0d r%0b idx %0d lat %0d",
              $time, soft_re, soft_im, dec_valid, dec_index, e.er, e.ei, e.ready, e.idx, cyc - e.c);
        end
        n_dec++;
      end
    end
  end

  task automatic load_random(bit do_g, bit do_w, bit do_b);
    @(negedge clk);
    in_valid = 0;
    g_load = do_g; w_load = do_w; b_load = do_b;
    if (do_w) begin
      s1 = $urandom_range(6, 9);  cmf_shift_in = 5'(s1);
      s2 = $urandom_range(7, 10); ff_shift_in = 5'(s2);
    end
    for (int j = 0; j < NTAP; j++) begin
      if (do_g) begin g_in[j] = coef_t'($urandom); g_r[j] = g_in[j].re; g_i[j] = g_in[j].im; end
      if (do_w) begin w_in[j] = coef_t'($urandom); w_r[j] = w_in[j].re; w_i[j] = w_in[j].im; end
    end
    for (int k = 0; k < NFB; k++)
      if (do_b) begin
        b_in[k].re = COEF_W'($urandom_range(0, 60) - 30);
        b_in[k].im = COEF_W'($urandom_range(0, 60) - 30);
        b_r[k] = b_in[k].re; b_i[k] = b_in[k].im;
      end
    @(negedge clk);
    g_load = 0; w_load = 0; b_load = 0;
  endtask

  task automatic run(int n, bit ready);
    for (int t = 0; t < n; t++) begin
      exp_t e;
      in_valid = ($urandom_range(0, 5) != 0);
      in_sample.re = SAMPLE_W'($urandom_range(0, 1000) - 500);
      in_sample.im = SAMPLE_W'($urandom_range(0, 1000) - 500);
      if (in_valid) begin
        model_step(in_sample.re, in_sample.im, e.er, e.ei);
        e.c = cyc; e.ready = ready; e.idx = n_out; n_out++;
        // before all coefficients are loaded the decision is computed but held back
        if (ready) q.push_back(e); else n_gated++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic do_flush();
    @(negedge clk); flush = 1;
    @(negedge clk); flush = 0;
    model_reset(); n_out = 0; n_flush++;
  endtask

  initial begin
    flush = 0; g_load = 0; w_load = 0; b_load = 0; in_valid = 0; in_sample = '0;
    cmf_shift_in = 0; ff_shift_in = 0;
    for (int j = 0; j < NTAP; j++) begin g_in[j] = '0; w_in[j] = '0; g_r[j] = 0; g_i[j] = 0; w_r[j] = 0; w_i[j] = 0; end
    for (int k = 0; k < NFB; k++) begin b_in[k] = '0; b_r[k] = 0; b_i[k] = 0; end
    s1 = 0; s2 = 0; n_out = 0;
    model_reset();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // g and w only: decisions are computed but held back
    load_random(1, 1, 0);
    run(200, 0);
    load_random(0, 0, 1);
    checks++; if (!coef_ready) failures++;
    run(2000, 1);
    do_flush();
    checks++; if (coef_ready) failures++;
    load_random(1, 1, 1);
    run(2000, 1);
    $display("decisions %0d, held back %0d, flushes %0d", n_dec, n_gated, n_flush);
    checks++;
    if (n_gated == 0 || n_dec < 1000 || q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
