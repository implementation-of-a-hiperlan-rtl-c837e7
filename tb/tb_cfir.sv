// Self-checking testbench for cfir, the complex FIR used as matched filter and
// feedforward filter. Random coefficients, samples and valid gaps are driven;
// each output is compared with a direct convolution computed here in integer
// arithmetic (with the same truncating shift and saturation), and the output
// must appear exactly one clock after its input strobe.
module tb_cfir;
  localparam int IN_W = 10, C_W = 8, OUT_W = 12, N = 5, SH_W = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, in_valid;
  logic signed [IN_W-1:0] in_re, in_im;
  logic signed [C_W-1:0]  c_re [N], c_im [N];
  logic [SH_W-1:0] shift;
  logic out_valid;
  logic signed [OUT_W-1:0] out_re, out_im;

  cfir #(.IN_W(IN_W), .C_W(C_W), .OUT_W(OUT_W), .N(N), .SH_W(SH_W)) dut (.*);

  int checks = 0, failures = 0, nsat = 0;
  longint hist_re [$], hist_im [$];
  longint exp_re, exp_im;
  logic   exp_pending;

  function automatic longint satv(longint v);
    longint mx = (64'sd1 <<< (OUT_W-1)) - 1;
    if (v > mx) return mx;
    if (v < -mx-1) return -mx-1;
    return v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(int blk, int t);
    checks++;
    if (exp_pending) begin
      if (!out_valid || out_re != OUT_W'(exp_re) || out_im != OUT_W'(exp_im)) begin
        failures++;
        if (failures < 10) $display("mismatch blk %0d t %0d: got %0d,%0d exp %0d,%0d v=%0b",
                                    blk, t, out_re, out_im, exp_re, exp_im, out_valid);
      end
    end else if (out_valid) failures++;
  endtask

  initial begin
    clear = 0; in_valid = 0; in_re = 0; in_im = 0; shift = 0; exp_pending = 0;
    for (int j = 0; j < N; j++) begin c_re[j] = 0; c_im[j] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < N-1; j++) begin hist_re.push_front(0); hist_im.push_front(0); end
    for (int blk = 0; blk < 8; blk++) begin
      @(negedge clk);
      check_out(blk, -1);
      in_valid = 0;
      exp_pending = 0;
      // every other block starts from an emptied delay line
      if (blk % 2 == 1) begin
        clear = 1;
        @(negedge clk);
        clear = 0;
        checks++;
        if (out_valid) failures++;
        for (int j = 0; j < N-1; j++) begin hist_re[j] = 0; hist_im[j] = 0; end
      end
      for (int j = 0; j < N; j++) begin
        c_re[j] = C_W'($urandom); c_im[j] = C_W'($urandom);
      end
      shift = SH_W'(blk < 4 ? 6 + blk : 3 + blk);
      for (int t = 0; t < 400; t++) begin
        @(negedge clk);
        check_out(blk, t);
        in_valid = ($urandom_range(0, 3) != 0);
        in_re = IN_W'($urandom); in_im = IN_W'($urandom);
        exp_pending = in_valid;
        if (in_valid) begin
          longint ar, ai;
          ar = 0; ai = 0;
          hist_re.push_front(in_re); hist_im.push_front(in_im);
          for (int j = 0; j < N; j++) begin
            ar += c_re[j] * hist_re[j] - c_im[j] * hist_im[j];
            ai += c_re[j] * hist_im[j] + c_im[j] * hist_re[j];
          end
          void'(hist_re.pop_back()); void'(hist_im.pop_back());
          exp_re = satv(ar >>> shift); exp_im = satv(ai >>> shift);
          if (exp_re != (ar >>> shift) || exp_im != (ai >>> shift)) nsat++;
        end
      end
    end
    @(negedge clk);
    if (nsat == 0) failures++;   // saturation must have been exercised
    $display("saturated outputs: %0d", nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
