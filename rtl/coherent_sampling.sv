// coherent_sampling: the entropy source of the TRNG.
//
// A D flip-flop samples the fast clock clk_a on every rising edge of the
// slightly detuned sampling clock clk_b.  Because the frequencies stand in
// the ratio K*(N+1) : N, N consecutive samples sweep K whole periods of
// clk_a, and the number of '1's among them is about N/2; jitter on the two
// clocks near clk_a's edges makes that number uncertain, and its LSB is the
// random bit.  The block counts the '1's in consecutive windows of n_samples
// Clk_B samples (the per-count sample number, N/K in the CB method) and
// hands each count to the system clock domain.  Counting the '1's over a
// fixed window, rather than runs of consecutive '1's, is the paper's
// method; the domain crossing is this design's own.
//
// Clk_B domain: the sample flip-flop, a sample index and a '1' counter.
// At the last sample of a window the finished count goes to a holding
// register and a toggle flag flips.  n_samples is copied into the Clk_B
// domain through two flip-flops and takes effect at the next window start;
// values below trng_pkg::N_MIN are raised to it so the handover below
// always has time to complete (Clk_B must not be faster than clk).
//
// clk domain: the toggle passes a two-flip-flop synchronizer; on each
// change cnt takes the held count and oe is high for one clk cycle.  A
// count appears 3 to 4 clk cycles after the window closes; one count is
// produced every n_samples Clk_B periods.
module coherent_sampling
  import trng_pkg::*;
(
  input  logic clk,        // system clock
  input  logic rst,        // synchronous to clk, active high
  input  logic clk_a,      // sampled clock (Clk_A)
  input  logic clk_b,      // sampling clock (Clk_B)
  input  cnt_t n_samples,  // samples per count, clk domain, quasi-static
  output cnt_t cnt,        // number of '1's in the last window
  output logic oe          // cnt valid, one clk cycle
);
  timeunit 1ps;
  timeprecision 1fs;

  // ---------------- Clk_B domain ----------------
  logic rst_b;
  reset_sync #(.STAGES(2)) u_rst_b (.clk(clk_b), .arst(rst), .rst(rst_b));

  logic smp;             // the coherent-sampling D flip-flop
  cnt_t n_meta, n_sync;  // n_samples brought into the Clk_B domain
  cnt_t n_cur;           // window length in use
  cnt_t idx;             // index of the current sample in the window
  cnt_t ones;            // '1's counted so far in the window
  cnt_t hold;            // finished count
  logic tgl_b;           // flips once per finished window

  always_ff @(posedge clk_b) smp <= clk_a;

  always_ff @(posedge clk_b) begin
    if (rst_b) begin
      n_meta <= '0;
      n_sync <= '0;
    end else begin
      n_meta <= n_samples;
      n_sync <= n_meta;
    end
  end

  function automatic cnt_t clamp_n(cnt_t n);
    return (n < cnt_t'(N_MIN)) ? cnt_t'(N_MIN) : n;
  endfunction

  always_ff @(posedge clk_b) begin
    if (rst_b) begin
      n_cur <= cnt_t'(N_MIN);
      idx   <= '0;
      ones  <= '0;
      hold  <= '0;
      tgl_b <= 1'b0;
    end else if (idx >= n_cur - 1'b1) begin
      hold  <= ones + cnt_t'(smp);
      tgl_b <= ~tgl_b;
      ones  <= '0;
      idx   <= '0;
      n_cur <= clamp_n(n_sync);
    end else begin
      ones  <= ones + cnt_t'(smp);
      idx   <= idx + 1'b1;
    end
  end

  // ---------------- clk domain ----------------
  logic [2:0] tgl_s;  // two synchronizer stages and one edge-detect stage

  always_ff @(posedge clk) begin
    if (rst) begin
      tgl_s <= '0;
      cnt   <= '0;
      oe    <= 1'b0;
    end else begin
      tgl_s <= {tgl_s[1:0], tgl_b};
      oe    <= tgl_s[2] ^ tgl_s[1];
      if (tgl_s[2] ^ tgl_s[1]) cnt <= hold;
    end
  end
endmodule
