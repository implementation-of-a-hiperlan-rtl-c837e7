// Self-checking testbench for channel_est, in both correlation lengths
// (31 symbols for QPSK, 62 for GMSK). For several random 5-tap channels
// at a random delay of 0..11 symbols it sends the periodic 31-chip training
// sequence (+-1 symbols) through the channel, computes the 16-lag correlation
// and the maximum-energy 5-symbol window here, and checks the estimated taps
// bit for bit, the sync lag (which must also equal the channel delay) and that
// `done` comes exactly NLAG + 1 clocks after the last correlated sample.
module tb_channel_est;
  import cmfdfe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, long_corr, in_valid, busy, done;
  sample_t in_sample;
  logic [3:0] sync;
  logic signed [EST_W-1:0] h_re [NTAP], h_im [NTAP];
  logic [2*EST_W+2:0] win_energy;

  channel_est dut (.*);

  int checks = 0, failures = 0;
  int chip [PN_LEN];   // +1 / -1

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic int c_at(int n);
    return chip[((n % int'(PN_LEN)) + int'(PN_LEN)) % int'(PN_LEN)];
  endfunction

  task automatic trial(int dly, bit gaps, bit lng);
    int hr [NTAP], hi [NTAP];
    int rr [CORR_LEN+NLAG-1], ri [CORR_LEN+NLAG-1];
    longint cr [NLAG], ci [NLAG], e [NLAG], best, w;
    int bk, lat, L;
    L = lng ? CORR_LEN : CORR_LEN / 2;
    hr[0] = $urandom_range(60, 120);  hi[0] = $urandom_range(0, 60) - 30;
    for (int i = 1; i < NTAP; i++) begin
      hr[i] = $urandom_range(0, 80) - 40; hi[i] = $urandom_range(0, 80) - 40;
    end
    for (int m = 0; m < CORR_LEN+NLAG-1; m++) begin
      rr[m] = 0; ri[m] = 0;
      for (int i = 0; i < NTAP; i++) begin
        rr[m] += hr[i] * c_at(m - dly - i);
        ri[m] += hi[i] * c_at(m - dly - i);
      end
    end
    for (int k = 0; k < NLAG; k++) begin
      cr[k] = 0; ci[k] = 0;
      for (int n = 0; n < L; n++) begin
        cr[k] += rr[n+k] * c_at(n);
        ci[k] += ri[n+k] * c_at(n);
      end
      e[k] = cr[k]*cr[k] + ci[k]*ci[k];
    end
    best = -1; bk = 0;
    for (int k = 0; k + NTAP <= NLAG; k++) begin
      w = 0;
      for (int i = 0; i < NTAP; i++) w += e[k+i];
      if (w > best) begin best = w; bk = k; end
    end
    @(negedge clk); start = 1; long_corr = lng;
    @(negedge clk); start = 0; long_corr = !lng;   // only sampled at start
    for (int m = 0; m < L+NLAG-1; m++) begin
      while (gaps && $urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      in_sample.re = SAMPLE_W'(rr[m]);
      in_sample.im = SAMPLE_W'(ri[m]);
      @(negedge clk);
    end
    in_valid = 0;
    lat = 0;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    // lat = clock edges from the one taking the last sample to the one raising done
    check(lat == NLAG + 1, $sformatf("done latency %0d", lat));
    check(sync == 4'(bk), $sformatf("sync %0d exp %0d", sync, bk));
    check(bk == dly, $sformatf("window %0d at channel delay %0d", bk, dly));
    check(win_energy == (2*EST_W+3)'(best), "window energy");
    for (int i = 0; i < NTAP; i++)
      check(h_re[i] == EST_W'(cr[bk+i]) && h_im[i] == EST_W'(ci[bk+i]), $sformatf("tap %0d", i));
    @(negedge clk);
    check(!done && !busy, "done is a single pulse");
  endtask

  initial begin
    // m-sequence of x^5 + x^2 + 1: a[n+5] = a[n+2] xor a[n], a[0..4] = 1
    begin
      bit a [PN_LEN+5];
      for (int n = 0; n < 5; n++) a[n] = 1;
      for (int n = 0; n < PN_LEN; n++) a[n+5] = a[n+2] ^ a[n];
      for (int n = 0; n < PN_LEN; n++) chip[n] = a[n] ? -1 : 1;
    end
    start = 0; long_corr = 0; in_valid = 0; in_sample = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 48; t++) trial(t % 12, (t / 12) % 2 == 1, t >= 24);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
