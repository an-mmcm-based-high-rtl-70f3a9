// tb_mmcm_trng_system: end-to-end test of the whole TRNG at its default
// parameters (set E10, CB method: Clk_A 775 MHz, Clk_B 96.774 MHz, K = 8,
// N/K = 120 samples per count, packed bytes, 6 Mbit/s UART).
//
// What is checked, and the numbers worked out from the clock settings:
//  - reset is held until both MMCMs lock;
//  - a window of 120 Clk_B samples sweeps exactly one Clk_A period, so the
//    counts average N/2 = 60 (within 1.5) and the MMCM jitter spreads them;
//  - one count per 120 Clk_B periods = 1.24 us, i.e. 0.806 Mbit/s:
//    100 counts must take 12400 system cycles (+-2);
//  - the bytes decoded from txd equal the LSBs of the reported counts,
//    eight per byte, first in bit 0;
//  - through AXI-Lite: N = 240 (two sweeps, mean 120) and read-back;
//    Pack_EN = 0 with N = 240, where two bytes per 2.48 us exceed what the
//    6 Mbit/s line carries and counts are dropped (overrun); N = 480, where
//    raw counts arrive without loss; and back to packed mode.
// Each of these events is counted and must happen at least once.
module tb_mmcm_trng_system;
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

  logic clk_in = 1'b0, rst = 1'b1;
  always #5000 clk_in = ~clk_in;

  logic [3:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 0, wvalid = 0, bready = 1, arvalid = 0, rready = 1;
  logic [31:0] wdata = '0;
  logic [3:0]  wstrb = 4'hF;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic [31:0] rdata;
  logic        txd, oe, overrun, locked;
  cnt_t        cnt;

  mmcm_trng_system dut (
    .clk_in, .rst,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .txd, .cnt, .oe, .overrun, .locked
  );

  logic [7:0] rx_data;
  int         rx_count, rx_errors;
  tb_uart_rx u_rx (.rxd(txd), .data(rx_data), .count(rx_count), .errors(rx_errors));

  // ---- AXI-Lite master ----------------------------------------------------
  int n_axi_writes = 0;
  task automatic axi_write(logic [3:0] a, logic [31:0] d);
    @(negedge clk_in);
    awaddr = a; awvalid = 1; wdata = d; wvalid = 1;
    do @(posedge clk_in); while (!(awready && wready));
    @(negedge clk_in) begin awvalid = 0; wvalid = 0; end
    do @(posedge clk_in); while (!bvalid);
    n_axi_writes++;
  endtask

  task automatic axi_read(logic [3:0] a, output logic [31:0] d);
    @(negedge clk_in);
    araddr = a; arvalid = 1;
    do @(posedge clk_in); while (!arready);
    @(negedge clk_in) arvalid = 0;
    do @(posedge clk_in); while (!rvalid);
    d = rdata;
  endtask

  // ---- reference byte stream built from the reported counts --------------
  logic  pack_mode = 1'b1;  // what the testbench last wrote to PACK_EN
  byte_t expq[$];
  int    last_push = 0, nacc = 0;
  byte_t acc;
  int    n_cnt = 0, n_overrun = 0, n_mismatch = 0, n_rx = 0;
  int    n_packed_bytes = 0, n_raw_values = 0;

  always @(posedge clk_in) if (!dut.rst_sys) begin
    int pushed;
    if (overrun) begin
      n_overrun++;
      repeat (last_push) if (expq.size()) void'(expq.pop_back());
    end
    pushed = 0;
    if (!pack_mode) nacc = 0;
    if (oe) begin
      n_cnt++;
      if (pack_mode) begin
        acc[nacc] = cnt[0];
        nacc++;
        if (nacc == 8) begin expq.push_back(acc); nacc = 0; pushed = 1; end
      end else begin
        expq.push_back(cnt[7:0]);
        expq.push_back(byte_t'(cnt >> 8));
        pushed = 2;
      end
    end
    last_push = pushed;
  end

  // Raw mode values are reassembled from byte pairs to count them.
  always @(rx_count) if (rx_count > 0) begin
    n_rx++;
    if (expq.size() == 0 || expq[0] != rx_data) begin
      n_mismatch++;
      if (n_mismatch < 5) $display("%0t rx %02x expected %02x", $time, rx_data, expq.size() ? expq[0] : 8'h00);
    end
    if (expq.size()) void'(expq.pop_front());
    if (pack_mode) n_packed_bytes++; else n_raw_values++;
  end

  initial begin : watchdog
    #(20_000_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned cyc = 0;
  always @(posedge clk_in) cyc++;

  task automatic run_counts(int num, output real mean, output int mn, output int mx,
                            output longint unsigned span);
    longint unsigned s = 0, t0 = 0;
    mn = 1 << 30; mx = 0;
    for (int i = 0; i <= num; i++) begin
      do @(posedge clk_in); while (!oe);
      if (i == 0) t0 = cyc;
      else begin
        s += cnt;
        if (cnt < mn) mn = cnt;
        if (cnt > mx) mx = cnt;
      end
    end
    span = cyc - t0;
    mean = real'(s) / num;
  endtask

  initial begin
    real mean; int mn, mx, ov0; longint unsigned span;
    logic [31:0] d;
    int n_lock_waits = 0, n_dist = 0;

    #200_000;
    check(!locked && dut.rst_sys, "system held in reset");
    rst = 1'b0;
    while (!locked) begin @(posedge clk_in); n_lock_waits++; end
    check(n_lock_waits > 60, $sformatf("lock after %0d cycles", n_lock_waits));
    repeat (3) @(posedge clk_in);
    check(!dut.rst_sys, "system reset released after lock");

    // 1. Default: packed, N = 120.
    run_counts(100, mean, mn, mx, span);
    $display("N=120: mean %0.2f range %0d..%0d, 100 counts in %0d cycles", mean, mn, mx, span);
    check(mean > 58.5 && mean < 61.5, $sformatf("N=120 mean %0.2f, expected 60", mean));
    check(mx - mn >= 2, "jitter spreads the counts");
    check(span >= 12398 && span <= 12402, $sformatf("count rate: %0d cycles per 100 counts, expected 12400", span));
    if (mx - mn >= 2) n_dist++;

    // 2. N = 240 through AXI-Lite.
    axi_write(REG_N, 32'd240);
    axi_read(REG_N, d);
    check(d == 240, "N read back");
    run_counts(3, mean, mn, mx, span);
    run_counts(50, mean, mn, mx, span);
    $display("N=240: mean %0.2f range %0d..%0d", mean, mn, mx);
    check(mean > 118.5 && mean < 121.5, $sformatf("N=240 mean %0.2f, expected 120", mean));
    check(span >= 12398 && span <= 12402, $sformatf("N=240: %0d cycles per 50 counts", span));

    // 3. Raw counter values, N = 240: too fast for the UART.
    ov0 = n_overrun;
    axi_write(REG_PACK_EN, 32'd0);
    pack_mode = 1'b0;
    run_counts(60, mean, mn, mx, span);
    check(n_overrun > ov0, $sformatf("overruns with raw values at N=240: %0d", n_overrun - ov0));

    // 4. Raw counter values, N = 480: no loss.
    axi_write(REG_N, 32'd480);
    run_counts(3, mean, mn, mx, span);
    ov0 = n_overrun;
    run_counts(30, mean, mn, mx, span);
    check(n_overrun == ov0, "no overruns with raw values at N=480");
    check(mean > 238.5 && mean < 241.5, $sformatf("N=480 mean %0.2f, expected 240", mean));

    // 5. Back to packed, N = 120.
    axi_write(REG_N, 32'd120);
    axi_write(REG_PACK_EN, 32'd1);
    pack_mode = 1'b1;
    run_counts(80, mean, mn, mx, span);
    #(5_000_000);

    check(n_mismatch == 0, $sformatf("%0d of %0d received bytes differ from the reference", n_mismatch, n_rx));
    check(rx_errors == 0, "UART framing");
    check(expq.size() <= 3, $sformatf("%0d bytes still queued", expq.size()));
    check(n_packed_bytes >= 20, $sformatf("packed bytes: %0d", n_packed_bytes));
    check(n_raw_values >= 60, $sformatf("raw bytes: %0d", n_raw_values));
    check(n_axi_writes == 5, "parameter changes");
    check(n_dist > 0, "random spread");
    $display("events: counts=%0d packed_bytes=%0d raw_bytes=%0d overruns=%0d axi_writes=%0d",
             n_cnt, n_packed_bytes, n_raw_values, n_overrun, n_axi_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
