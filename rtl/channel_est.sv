// Channel estimator: PN correlator with a 5-symbol maximum-energy window search.
//
// After `start`, the next L + NLAG - 1 symbol-spaced samples are
// correlated with the training PN sequence at NLAG lags at once:
//     h[k] = sum_{n=0}^{L-1} r[n+k] * c[n mod 31],  k = 0..NLAG-1,
// where L = CLEN (62, GMSK) when `long_corr` is set at `start` and CLEN/2
// (31, QPSK) otherwise,
// and c = +-1 are the chips of a 31-chip m-sequence. Since the chips are
// +-1, each lag only adds or subtracts the incoming sample, so all NLAG
// accumulators update in the clock the sample arrives and the correlation is
// finished with the last sample. A chip shift register supplies c[m-k] to lag k.
// The window search then walks the lags, one per clock, forming |h[k]|^2 and a
// sliding sum over NWIN lags, and keeps the first window with the largest
// energy. Its taps are the channel estimate and its start lag is the frame
// synchronisation offset. `done` pulses once, NLAG + 1 clocks after the last
// sample; the outputs then hold until the next `start`.
//
// Correlating the first PN sequence over a 16-symbol timing uncertainty, over
// 31 symbols for QPSK and 62 for GMSK, and choosing the 5-symbol window of largest
// power follow the design's training scheme. The PN generator polynomial
// (x^5 + x^2 + 1, all-ones seed, chip bit 1 meaning -1), the real +-1 training
// symbols and the unnormalised sums are this design's own choices.
module channel_est
  import cmfdfe_pkg::*;
#(
  parameter int unsigned CLEN  = CORR_LEN,
  parameter int unsigned LAGS  = NLAG,
  parameter int unsigned NWIN  = NTAP,
  parameter int unsigned ACC_W = EST_W,
  parameter logic [4:0]  SEED  = 5'b11111
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     long_corr,
  input  logic                     in_valid,
  input  sample_t                  in_sample,
  output logic                     busy,
  output logic                     done,
  output logic [$clog2(LAGS)-1:0]  sync,
  output logic signed [ACC_W-1:0]  h_re [NWIN],
  output logic signed [ACC_W-1:0]  h_im [NWIN],
  output logic [2*ACC_W+2:0]       win_energy
);
  localparam int unsigned NSAMP = CLEN + LAGS - 1;
  localparam int unsigned CW    = $clog2(NSAMP + 1);
  localparam int unsigned LW    = $clog2(LAGS);
  localparam int unsigned EW    = 2*ACC_W + 1;      // |h|^2
  localparam int unsigned SW    = 2*ACC_W + 3;      // window sum

  typedef enum logic [1:0] {IDLE, CORR, SEARCH, HOLD} state_t;
  state_t state;

  logic [4:0]              lfsr;
  logic [CW-1:0]           cnt;          // samples taken
  logic                    chip_v  [LAGS];   // chip for lag k is c[m-k] and valid
  logic                    chip_neg[LAGS];
  logic signed [ACC_W-1:0] acc_re  [LAGS];
  logic signed [ACC_W-1:0] acc_im  [LAGS];
  logic [EW-1:0]           e_hist  [NWIN];   // |h|^2 of the last NWIN lags
  logic [SW-1:0]           wsum, best;
  logic [LW:0]             k;            // lag under search
  logic [LW-1:0]           best_k;
  logic [EW-1:0]           e_k;
  logic [SW-1:0]           wsum_next;

  // Chip of the current sample (index m = cnt) for lag 0
  // Correlation length of this run, latched at start
  logic          long_q;
  logic [CW-1:0] clen_eff, last_cnt;
  assign clen_eff = long_q ? CW'(CLEN) : CW'(CLEN/2);
  assign last_cnt = clen_eff + CW'(LAGS - 2);

  logic cur_v, cur_neg;
  assign cur_v   = (cnt < clen_eff);
  assign cur_neg = lfsr[0];

  // Chip seen by each lag for the incoming sample
  logic lag_v [LAGS], lag_neg [LAGS];
  always_comb begin
    for (int i = 0; i < LAGS; i++) begin
      lag_v[i]   = (i == 0) ? cur_v   : chip_v[i-1];
      lag_neg[i] = (i == 0) ? cur_neg : chip_neg[i-1];
    end
  end

  always_comb begin
    logic signed [2*ACC_W-1:0] sr, si;
    logic [LW-1:0] kk;
    kk = k[LW-1:0];
    sr = acc_re[kk] * acc_re[kk];
    si = acc_im[kk] * acc_im[kk];
    e_k = EW'(unsigned'(sr)) + EW'(unsigned'(si));
    wsum_next = wsum + SW'(e_k) - SW'(e_hist[NWIN-1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      long_q <= 1'b1;
      lfsr  <= SEED;
      cnt   <= '0;
      k     <= '0;
      wsum  <= '0;
      best  <= '0;
      best_k <= '0;
      done  <= 1'b0;
      sync  <= '0;
      win_energy <= '0;
      for (int i = 0; i < LAGS; i++) begin
        chip_v[i] <= 1'b0; chip_neg[i] <= 1'b0;
        acc_re[i] <= '0;   acc_im[i]   <= '0;
      end
      for (int i = 0; i < NWIN; i++) begin
        e_hist[i] <= '0; h_re[i] <= '0; h_im[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start) begin
        state <= CORR;
        long_q <= long_corr;
        lfsr  <= SEED;
        cnt   <= '0;
        for (int i = 0; i < LAGS; i++) begin
          chip_v[i] <= 1'b0;
          acc_re[i] <= '0; acc_im[i] <= '0;
        end
      end else begin
        unique case (state)
          IDLE, HOLD: ;
          CORR: if (in_valid) begin
            // lag 0 uses the current chip, lag k the chip k samples back
            for (int i = 0; i < LAGS; i++) begin
              if (lag_v[i]) begin
                acc_re[i] <= lag_neg[i] ? acc_re[i] - ACC_W'(in_sample.re) : acc_re[i] + ACC_W'(in_sample.re);
                acc_im[i] <= lag_neg[i] ? acc_im[i] - ACC_W'(in_sample.im) : acc_im[i] + ACC_W'(in_sample.im);
              end
            end
            chip_v[0]   <= cur_v;
            chip_neg[0] <= cur_neg;
            for (int i = 1; i < LAGS; i++) begin
              chip_v[i]   <= chip_v[i-1];
              chip_neg[i] <= chip_neg[i-1];
            end
            // Fibonacci LFSR for x^5 + x^2 + 1
            lfsr <= {lfsr[0] ^ lfsr[2], lfsr[4:1]};
            cnt  <= cnt + 1'b1;
            if (cnt == last_cnt) begin
              state <= SEARCH;
              k     <= '0;
              wsum  <= '0;
              best  <= '0;
              best_k <= '0;
              for (int i = 0; i < NWIN; i++) e_hist[i] <= '0;
            end
          end
          SEARCH: begin
            // e_hist[i] holds |h[k-1-i]|^2
            e_hist[0] <= e_k;
            for (int i = 1; i < NWIN; i++) e_hist[i] <= e_hist[i-1];
            wsum <= wsum_next;
            if (k >= (LW+1)'(NWIN-1) && (wsum_next > best || k == (LW+1)'(NWIN-1))) begin
              best   <= wsum_next;
              best_k <= LW'(k - (LW+1)'(NWIN-1));
            end
            if (k == (LW+1)'(LAGS-1)) state <= HOLD;
            k <= k + 1'b1;
          end
          default: state <= IDLE;
        endcase
      end
      // Publish the estimate one clock after the search ends
      if (!start && state == HOLD && k == (LW+1)'(LAGS)) begin
        sync       <= best_k;
        win_energy <= best;
        for (int i = 0; i < NWIN; i++) begin
          h_re[i] <= acc_re[best_k + LW'(i)];
          h_im[i] <= acc_im[best_k + LW'(i)];
        end
        done <= 1'b1;
        k    <= '0;
      end
    end
  end

  assign busy = (state == CORR) || (state == SEARCH) || (state == HOLD && k == (LW+1)'(LAGS));
endmodule
