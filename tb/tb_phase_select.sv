// Self-checking testbench for phase_select. Two packets of 2x oversampled
// samples are sent, the first with the strong samples on the even phase, the
// second on the odd phase (plus a third with equal energy, where even must
// win). The testbench sums the energies itself, checks the choice, and checks
// that each selected sample comes out exactly MEAS_LEN symbols after it went
// in, one clock after the odd sample of the pair that pushes it out.
module tb_phase_select;
  import cmfdfe_pkg::*;
  localparam int M = 31;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, in_valid;
  sample_t in_sample;
  logic out_valid, decided, odd_sel;
  sample_t out_sample;
  logic [2*SAMPLE_W+$clog2(M):0] energy_even, energy_odd;

  phase_select #(.MEAS_LEN(M)) dut (.*);

  int checks = 0, failures = 0, n_even = 0, n_odd = 0;

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

  // mode 0: even strong, 1: odd strong, 2: both equal
  task automatic run_packet(int mode, int npairs);
    sample_t ev [$], od [$];
    longint ee, eo;
    int outs;
    ee = 0; eo = 0; outs = 0;
    for (int p = 0; p < npairs; p++) begin
      sample_t a, b;
      a.re = SAMPLE_W'($urandom_range(0, 1000)) - SAMPLE_W'(500);
      a.im = SAMPLE_W'($urandom_range(0, 1000)) - SAMPLE_W'(500);
      b = a;
      if (mode != 2) begin
        b.re = a.re >>> 2;
        b.im = a.im >>> 2;
      end
      if (mode == 1) begin sample_t t; t = a; a = b; b = t; end
      ev.push_back(a); od.push_back(b);
    end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int p = 0; p < npairs; p++) begin
      for (int h = 0; h < 2; h++) begin
        // random idle clocks between samples
        while ($urandom_range(0, 2) == 0) begin
          in_valid = 0;
          @(negedge clk);
          check(!out_valid, "spurious out_valid");
        end
        in_valid = 1;
        in_sample = h ? od[p] : ev[p];
        if (p < M) begin
          if (h) eo += longint'(od[p].re)**2 + longint'(od[p].im)**2;
          else   ee += longint'(ev[p].re)**2 + longint'(ev[p].im)**2;
        end
        @(negedge clk);
        if (h && p >= M) begin
          sample_t e;
          e = (ee >= eo) ? ev[p-M] : od[p-M];
          check(out_valid && out_sample == e, "selected sample / latency");
          outs++;
        end else begin
          check(!out_valid, "out_valid early");
        end
      end
    end
    in_valid = 0;
    check(decided, "decided");
    check(energy_even == ee && energy_odd == eo, "energies");
    check(odd_sel == (eo > ee), "phase choice");
    check(outs == npairs - M, "output count");
    if (odd_sel) n_odd++; else n_even++;
  endtask

  initial begin
    start = 0; in_valid = 0; in_sample = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_packet(0, 100);
    run_packet(1, 80);
    run_packet(2, 40);
    run_packet(1, 31);
    checks++;
    if (n_even != 2 || n_odd != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
