// timing_recovery: symbol timing recovery (STR) built on a Gardner timing
// error detector (TED) and a discrete timing index.
//
// The matched-filter output arrives at L = sps(mode) samples per symbol. A
// free-running counter cnt (0 .. L-1) marks the position inside a symbol and
// the timing index n_opt selects the sampling instant: when cnt == n_opt the
// current sample is taken as the symbol sample (strobe). At each strobe the
// Gardner error
//   e = y[n - L/2] * (y[n] - y[n - L])
// is formed on I (and added for Q in the two-dimensional modes). It is
// summed over WIN symbols, together with the signal power sum y[n]^2. At the
// end of a window the summed error is compared against the threshold
// power >> TH_SHIFT:
//   above +threshold : sampling late, n_opt steps one sample earlier;
//   below -threshold : sampling early, n_opt steps one sample later;
//   otherwise        : in band; after LOCK_WIN such windows in a row, locked.
// The Gardner error is also near zero half a symbol away from the optimum
// (the unstable balance point, where the strobes fall on symbol
// transitions). To leave it, an in-band window only counts as good when the
// strobe power times L exceeds the power summed over all samples of the
// window (the eye is open at the strobe); otherwise n_opt steps one sample
// later.
// Any step clears the lock. A step across the symbol boundary (n_opt
// wrapping) may drop or repeat one strobe. The Gardner TED and the search
// for the optimum sampling instant n_opt are the design's; the windowed
// threshold update, the power-relative threshold and all sizes are this
// implementation's choices.
// Timing: strobe, s_i and s_q are registered one clock after the sample.
module timing_recovery
  import mmbmd_pkg::*;
#(
  parameter int WIN      = 32,
  parameter int TH_SHIFT = 4,
  parameter int LOCK_WIN = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  mod_t    mode,
  input  sample_t y_i,
  input  sample_t y_q,
  output logic    strobe,
  output sample_t s_i,
  output sample_t s_q,
  output logic [$clog2(LMAX)-1:0] n_opt,
  output logic    locked,
  output logic    step_early,   // pulse: n_opt moved one sample earlier
  output logic    step_late     // pulse: n_opt moved one sample later
);
  localparam int IW = $clog2(LMAX);

  sample_t                 hi [1:LMAX];
  sample_t                 hq [1:LMAX];
  logic [IW-1:0]           cnt;
  logic [$clog2(WIN)-1:0]  nsym;
  logic [$clog2(LOCK_WIN+1)-1:0] nlock;
  logic signed [47:0]      acc_e, acc_p, acc_a, e_now, p_now, e_sum, p_sum, a_sum, th;
  logic                    eye_open;
  logic                    take;
  logic [IW:0]             l, h;     // samples per symbol and half of it

  assign l    = (IW+1)'(sps(mode));
  assign h    = l >> 1;
  assign take = (32'(cnt) == 32'(n_opt));

  always_comb begin
    e_now = 48'(hi[h]) * (48'(y_i) - 48'(hi[l]));
    p_now = 48'(y_i) * 48'(y_i);
    if (two_dim(mode)) begin
      e_now += 48'(hq[h]) * (48'(y_q) - 48'(hq[l]));
      p_now += 48'(y_q) * 48'(y_q);
    end
    e_sum    = acc_e + e_now;
    p_sum    = acc_p + p_now;
    a_sum    = acc_a + p_now;
    th       = p_sum >>> TH_SHIFT;
    eye_open = (p_sum * 48'(l)) > a_sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= LMAX; i++) begin hi[i] <= '0; hq[i] <= '0; end
      cnt        <= '0;
      n_opt      <= '0;
      nsym       <= '0;
      nlock      <= '0;
      acc_e      <= '0;
      acc_p      <= '0;
      acc_a      <= '0;
      locked     <= 1'b0;
      strobe     <= 1'b0;
      s_i        <= '0;
      s_q        <= '0;
      step_early <= 1'b0;
      step_late  <= 1'b0;
    end else begin
      hi[1] <= y_i;
      hq[1] <= y_q;
      for (int i = 2; i <= LMAX; i++) begin hi[i] <= hi[i-1]; hq[i] <= hq[i-1]; end
      cnt        <= ((IW+1)'(cnt) >= l - 1'b1) ? '0 : cnt + 1'b1;
      strobe     <= take;
      step_early <= 1'b0;
      step_late  <= 1'b0;
      if ((IW+1)'(n_opt) >= l) n_opt <= '0;
      acc_a <= a_sum;
      if (take) begin
        s_i <= y_i;
        s_q <= two_dim(mode) ? y_q : '0;
        if (32'(nsym) == WIN - 1) begin
          nsym  <= '0;
          acc_e <= '0;
          acc_p <= '0;
          acc_a <= '0;
          if (e_sum > th) begin
            n_opt      <= (n_opt == '0) ? IW'(l - 1'b1) : n_opt - 1'b1;
            step_early <= 1'b1;
            nlock      <= '0;
            locked     <= 1'b0;
          end else if (e_sum < -th || !eye_open) begin
            n_opt      <= ((IW+1)'(n_opt) >= l - 1'b1) ? '0 : n_opt + 1'b1;
            step_late  <= 1'b1;
            nlock      <= '0;
            locked     <= 1'b0;
          end else if (32'(nlock) < LOCK_WIN) begin
            nlock <= nlock + 1'b1;
            if (32'(nlock) == LOCK_WIN - 1) locked <= 1'b1;
          end
        end else begin
          nsym  <= nsym + 1'b1;
          acc_e <= e_sum;
          acc_p <= p_sum;
        end
      end
    end
  end
endmodule
