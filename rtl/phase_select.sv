// Sample phase selection for a receiver sampling at twice the symbol rate.
//
// The ADC delivers two samples per symbol. Consecutive samples are written as
// an (even, odd) pair into a circular buffer, so the buffer holds the even and
// the odd sample stream side by side, and the energy |x|^2 of each stream is
// accumulated over the first MEAS_LEN symbols after `start`. The stream with
// more energy (even wins a tie) is then chosen and read out of the buffer,
// one T-spaced sample per symbol, MEAS_LEN symbols after it was written. The
// selection holds until the next `start`.
//
// Interface: in_valid strobes one ADC sample; the first sample after `start`
// is even. out_valid strobes one selected sample in the clock after the odd
// sample of a pair arrives, from pair MEAS_LEN onward. `decided` and
// `odd_sel` report the choice; `energy_even/odd` the measured energies.
//
// Splitting the samples into even and odd buffers and picking the one of
// higher energy follows the baseband demonstrator; the measurement length
// (one 31-symbol PN period) and the tie rule are this design's own choices.
module phase_select
  import cmfdfe_pkg::*;
#(
  parameter int unsigned MEAS_LEN = PN_LEN,
  parameter int unsigned E_W      = 2*SAMPLE_W + $clog2(MEAS_LEN) + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           in_valid,
  input  sample_t        in_sample,
  output logic           out_valid,
  output sample_t        out_sample,
  output logic           decided,
  output logic           odd_sel,
  output logic [E_W-1:0] energy_even,
  output logic [E_W-1:0] energy_odd
);
  localparam int unsigned AW = (MEAS_LEN > 1) ? $clog2(MEAS_LEN) : 1;

  typedef struct packed {
    sample_t even;
    sample_t odd;
  } pair_t;

  pair_t            buf_mem [MEAS_LEN];
  logic [AW-1:0]    wp;
  logic [AW:0]      npairs;     // pairs counted towards the measurement
  logic             odd_next;   // next sample is the odd one of a pair
  sample_t          even_hold;
  logic [E_W-1:0]   pwr;
  logic             measuring;

  assign measuring = !decided && (npairs < (AW+1)'(MEAS_LEN));

  always_comb begin
    logic signed [2*SAMPLE_W-1:0] p_re, p_im;
    p_re = in_sample.re * in_sample.re;
    p_im = in_sample.im * in_sample.im;
    pwr  = E_W'(unsigned'(p_re)) + E_W'(unsigned'(p_im));
  end

  // Buffer: read the pair written MEAS_LEN symbols ago, then overwrite it
  always_ff @(posedge clk) begin
    if (in_valid && odd_next) begin
      buf_mem[wp] <= '{even: even_hold, odd: in_sample};
      if (decided)
        out_sample <= odd_sel ? buf_mem[wp].odd : buf_mem[wp].even;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp          <= '0;
      npairs      <= '0;
      odd_next    <= 1'b0;
      even_hold   <= '0;
      decided     <= 1'b0;
      odd_sel     <= 1'b0;
      energy_even <= '0;
      energy_odd  <= '0;
      out_valid   <= 1'b0;
    end else if (start) begin
      wp          <= '0;
      npairs      <= '0;
      odd_next    <= 1'b0;
      decided     <= 1'b0;
      odd_sel     <= 1'b0;
      energy_even <= '0;
      energy_odd  <= '0;
      out_valid   <= 1'b0;
    end else begin
      out_valid <= in_valid && odd_next && decided;
      if (in_valid) begin
        odd_next <= !odd_next;
        if (!odd_next) begin
          even_hold <= in_sample;
          if (measuring) energy_even <= energy_even + pwr;
        end else begin
          wp <= (wp == AW'(MEAS_LEN-1)) ? '0 : wp + 1'b1;
          if (measuring) begin
            energy_odd <= energy_odd + pwr;
            npairs     <= npairs + 1'b1;
            if (npairs == (AW+1)'(MEAS_LEN-1)) begin
              decided <= 1'b1;
              odd_sel <= (energy_odd + pwr) > energy_even;
            end
          end
        end
      end
    end
  end
endmodule
