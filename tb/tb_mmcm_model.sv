// tb_mmcm_model: self-checking test of the behavioural MMCM model.
//
// Three instances run from one 100 MHz input: Clk_A and Clk_B of parameter
// set E10 (CB method) without jitter, and Clk_A again with the default
// 427 ps peak-to-peak jitter.  Checks:
//  - LOCKED stays low in reset and rises 64..66 input cycles after it;
//  - the output is held low in reset;
//  - over 960 Clk_B periods exactly 8*961 = 7688 Clk_A periods elapse
//    (ratio K*(N+1) : N with K = 8, N = 960), worked out from
//    f = M/(D*Q) * 100 MHz;
//  - the jittered output has the same average frequency (edge count over
//    50 us is 775 MHz * 50 us = 38750, +-1) and its rising edges deviate
//    from the ideal grid by at most half the peak-to-peak jitter, and by
//    more than a quarter of it at least once.
module tb_mmcm_model;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic clk_in = 1'b0, rst = 1'b1;
  always #5000 clk_in = ~clk_in;

  logic a, b, aj, lock_a, lock_b, lock_aj;

  mmcm_model #(.M8(496), .D(8), .Q8(8),  .JITTER_PP_PS(0))   u_a  (.CLKIN1(clk_in), .RST(rst), .CLKOUT0(a),  .LOCKED(lock_a));
  mmcm_model #(.M8(480), .D(8), .Q8(62), .JITTER_PP_PS(0))   u_b  (.CLKIN1(clk_in), .RST(rst), .CLKOUT0(b),  .LOCKED(lock_b));
  mmcm_model                                                   u_aj (.CLKIN1(clk_in), .RST(rst), .CLKOUT0(aj), .LOCKED(lock_aj));

  // Rising-edge counters.
  longint unsigned na = 0, nb = 0, naj = 0;
  always @(posedge a)  na++;
  always @(posedge b)  nb++;

  // Deviation of jittered rising edges from the ideal grid
  // (ideal rising edges at odd multiples of T/2, T = 1e7 fs * D*Q/M).
  real max_dev_ps = 0.0;
  always @(posedge aj) begin
    real t_fs, half_fs, ideal_fs, dev;
    naj++;
    half_fs  = 1.0e7 * 8.0 * 8.0 / (2.0 * 496.0);
    t_fs     = $realtime * 1000.0;
    // nearest ideal rising edge, an odd multiple of half a period
    ideal_fs = (2.0 * $floor((t_fs / half_fs + 1.0) / 2.0 + 0.5) - 1.0) * half_fs;
    dev      = (t_fs - ideal_fs) / 1000.0;
    if (dev < 0) dev = -dev;
    if (dev > max_dev_ps) max_dev_ps = dev;
  end

  initial begin : watchdog
    #(2_000_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    longint unsigned a0, b0, aj0;
    // In reset: no lock, no output.
    repeat (20) @(posedge clk_in);
    check(!lock_a && !lock_b && !lock_aj, "LOCKED low in reset");
    check(na == 0 && nb == 0, "outputs held low in reset");
    @(negedge clk_in) rst = 1'b0;
    cyc = 0;
    while (!lock_a) begin @(posedge clk_in); cyc++; end
    check(cyc >= 64 && cyc <= 66, $sformatf("lock after %0d input cycles", cyc));
    check(lock_b && lock_aj, "all instances locked");

    // Exact ratio: count Clk_A rising edges over 960 Clk_B periods.
    @(posedge b);
    a0 = na; b0 = nb;
    repeat (960) @(posedge b);
    check(na - a0 == 7688,
          $sformatf("Clk_A periods per 960 Clk_B periods: %0d, expected 7688", na - a0));

    // Average frequency of the jittered output over 50 us.
    aj0 = naj;
    #(50_000_000);
    check((naj - aj0) >= 38749 && (naj - aj0) <= 38751,
          $sformatf("jittered edges in 50 us: %0d, expected 38750", naj - aj0));
    check(max_dev_ps <= 213.5 + 0.01, $sformatf("max jitter %0.1f ps <= 213.5", max_dev_ps));
    check(max_dev_ps > 106.0, $sformatf("jitter present (%0.1f ps)", max_dev_ps));

    // Reset again: LOCKED drops.
    rst = 1'b1;
    #1000;
    check(!lock_a && !a, "reset clears LOCKED and output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
