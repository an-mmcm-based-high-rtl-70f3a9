// tb_coherent_sampling: self-checking test of the coherent sampler.
//
// Jitter-free clocks with a known rational ratio: Clk_A has a 5000 ps
// period, Clk_B 10250 ps (97.56 MHz), so f_A : f_B = 82 : 40 = 2*41 : 40
// and every Clk_B sample lands 250 ps (1/20 period) further into Clk_A's
// cycle; Clk_B is offset by 123 ps so no edges coincide.  Hence, worked
// out from the ratio alone and independent of window alignment:
//  - n = 20 samples sweep one whole Clk_A period: every count is 10;
//  - n = 40 sweeps two periods: every count is 20;
//  - n = 10 sweeps half a period: consecutive counts sum to 10;
//  - n = 3 is raised to the minimum window of 8 samples.
// The count rate is checked too: 16 windows of n samples take
// 16 * n * 10250 ps, measured in 10 ns system-clock cycles to +-1.
// n_samples changes at run time and takes effect within three windows.
module tb_coherent_sampling;
  timeunit 1ps;
  timeprecision 1fs;
  import trng_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic clk = 1'b0, clk_a = 1'b0, clk_b = 1'b0, rst = 1'b1;
  always #5000 clk = ~clk;
  always #2500 clk_a = ~clk_a;
  initial begin
    #123;
    forever #5125 clk_b = ~clk_b;
  end

  cnt_t n_samples = cnt_t'(20);
  cnt_t cnt;
  logic oe;

  coherent_sampling dut (.clk, .rst, .clk_a, .clk_b, .n_samples, .cnt, .oe);

  longint unsigned cyc = 0;
  always @(posedge clk) cyc++;

  // Collect the next count; returns it and the cycle it appeared in.
  task automatic next_count(output int unsigned value, output longint unsigned at);
    do @(posedge clk); while (!oe);
    value = cnt;
    at    = cyc;
  endtask

  task automatic settle(int windows);
    int unsigned v; longint unsigned t;
    repeat (windows) next_count(v, t);
  endtask

  // All of 'num' counts must equal 'expect_v'; the span of 16 windows is
  // checked against 16*n*T_B.
  task automatic check_const(int unsigned n, int unsigned expect_v, int num);
    int unsigned v; longint unsigned t0, t1;
    int bad = 0;
    longint unsigned span_ps, span_cyc;
    next_count(v, t0);
    for (int i = 0; i < num; i++) begin
      next_count(v, t1);
      if (v != expect_v) bad++;
      if (i == 15) begin
        span_ps  = 16 * longint'(n) * 10250;
        span_cyc = t1 - t0;
        check(span_cyc * 10000 + 10000 >= span_ps && span_cyc * 10000 <= span_ps + 10000,
              $sformatf("n=%0d: 16 windows took %0d cycles, expected %0d ps", n, span_cyc, span_ps));
      end
    end
    check(bad == 0, $sformatf("n=%0d: %0d of %0d counts differ from %0d", n, bad, num, expect_v));
  endtask

  initial begin : watchdog
    #(5_000_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned v0, v1; longint unsigned t;
    int bad;
    repeat (5) @(posedge clk);
    check(!oe, "no output in reset");
    @(negedge clk) rst = 1'b0;

    settle(3);
    check_const(20, 10, 40);

    n_samples = cnt_t'(40);
    settle(3);
    check_const(40, 20, 30);

    n_samples = cnt_t'(10);
    settle(3);
    bad = 0;
    for (int i = 0; i < 20; i++) begin
      next_count(v0, t);
      next_count(v1, t);
      if (v0 + v1 != 10) bad++;
    end
    check(bad == 0, $sformatf("n=10: %0d count pairs do not sum to 10", bad));

    // Below the minimum: the window is N_MIN samples.
    n_samples = cnt_t'(3);
    settle(4);
    begin
      longint unsigned t0, t1;
      next_count(v0, t0);
      repeat (16) next_count(v0, t1);
      check((t1 - t0) * 10000 + 10000 >= 16 * N_MIN * 10250 &&
            (t1 - t0) * 10000 <= 16 * N_MIN * 10250 + 10000,
            $sformatf("n=3 clamped to %0d: 16 windows took %0d cycles", N_MIN, t1 - t0));
    end

    // Reset in operation clears the output.
    rst = 1'b1;
    repeat (3) @(posedge clk);
    check(cnt == 0 && !oe, "reset clears cnt and oe");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
