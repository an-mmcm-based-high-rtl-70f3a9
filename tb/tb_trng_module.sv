// tb_trng_module: end-to-end test of the TRNG core with testbench clocks.
//
// Clk_A (5000 ps period) and Clk_B (10250 ps) stand in a 2*41 : 40 ratio,
// so a window of 20 samples sweeps one Clk_A period; every Clk_A edge is
// moved by a random +-300 ps so the counts scatter around 10.  The module
// starts from N_DEFAULT = 20, packed.  A UART receiver decodes txd and the
// testbench rebuilds the expected byte stream from the counter values the
// module reports on cnt/oe (eight LSBs per byte, first in bit 0; or two
// bytes per value, low first), removing the data of any reported overrun.
// Phases: packed with N = 20, then over AXI-Lite Pack_EN = 0 with N = 400
// (raw counts near 200, no overruns), then N = 20 unpacked (the UART
// cannot keep up: overruns must occur).  Received bytes must equal the
// reference; counts must average N/2 within 1.  Finally Clk_B is stopped
// and every expected byte must have arrived.
module tb_trng_module;
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
  initial forever begin
    int j;
    j = $urandom_range(600);
    #(2200 + j);
    clk_a = ~clk_a;
    #(2800 - j);
  end
  logic b_run = 1'b1;  // cleared at the end to stop new counts
  initial begin
    #123;
    forever #5125 clk_b = ~clk_b & b_run;
  end

  logic [3:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 0, wvalid = 0, bready = 1, arvalid = 0, rready = 1;
  logic [31:0] wdata = '0;
  logic [3:0]  wstrb = 4'hF;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic [31:0] rdata;
  logic        txd, oe, overrun;
  cnt_t        cnt;

  trng_module #(.N_DEFAULT(cnt_t'(20)), .PACK_EN_DEFAULT(1'b1)) dut (
    .clk, .rst, .clk_a, .clk_b,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .txd, .cnt, .oe, .overrun
  );

  logic [7:0] rx_data;
  int         rx_count, rx_errors;
  tb_uart_rx u_rx (.rxd(txd), .data(rx_data), .count(rx_count), .errors(rx_errors));

  task automatic axi_write(logic [3:0] a, logic [31:0] d);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wvalid = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk) begin awvalid = 0; wvalid = 0; end
    do @(posedge clk); while (!bvalid);
  endtask

  // ---- reference byte stream -------------------------------------------
  byte_t expq[$];
  int    last_push = 0, nacc = 0;
  byte_t acc;
  int    n_overrun = 0, n_cnt = 0, n_mismatch = 0, n_rx = 0;
  longint unsigned sum_cnt = 0;

  always @(posedge clk) if (!rst) begin
    int pushed;
    if (overrun) begin
      n_overrun++;
      repeat (last_push) if (expq.size()) void'(expq.pop_back());
    end
    pushed = 0;
    if (!dut.pack_en) nacc = 0;
    if (oe) begin
      n_cnt++;
      sum_cnt += cnt;
      if (dut.pack_en) begin
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

  always @(rx_count) if (rx_count > 0) begin
    n_rx++;
    if (expq.size() == 0 || expq[0] != rx_data) begin
      n_mismatch++;
      if (n_mismatch < 5) $display("%0t rx %02x expected %02x", $time, rx_data, expq.size() ? expq[0] : 8'h00);
    end
    if (expq.size()) void'(expq.pop_front());
  end

  initial begin : watchdog
    #(20_000_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_counts(int num, output real mean, output int mn, output int mx);
    longint unsigned s = 0;
    mn = 1 << 30; mx = 0;
    for (int i = 0; i < num; i++) begin
      do @(posedge clk); while (!oe);
      s += cnt;
      if (cnt < mn) mn = cnt;
      if (cnt > mx) mx = cnt;
    end
    mean = real'(s) / num;
  endtask

  initial begin
    real mean; int mn, mx, rx0, ov0;
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 0;

    // Packed, N = 20.
    run_counts(400, mean, mn, mx);
    check(mean > 9.0 && mean < 11.0, $sformatf("N=20 mean count %0.2f", mean));
    check(mx > mn, $sformatf("jitter spreads the counts (%0d..%0d)", mn, mx));
    check(n_rx >= 45, $sformatf("packed bytes received: %0d", n_rx));

    // Unpacked, N = 400.
    axi_write(REG_PACK_EN, 32'h0);
    axi_write(REG_N, 32'd400);
    run_counts(3, mean, mn, mx);
    rx0 = n_rx; ov0 = n_overrun;
    run_counts(40, mean, mn, mx);
    check(mean > 199.0 && mean < 201.0, $sformatf("N=400 mean count %0d", int'(mean)));
    check(n_overrun == ov0, "no overruns at N=400 unpacked");
    check(n_rx - rx0 >= 76, $sformatf("raw bytes received: %0d", n_rx - rx0));

    // Unpacked, N = 20: the UART is too slow, values are dropped.
    axi_write(REG_N, 32'd20);
    run_counts(300, mean, mn, mx);
    check(n_overrun > ov0, $sformatf("overruns at N=20 unpacked: %0d", n_overrun - ov0));

    // Back to packed and drain.
    axi_write(REG_PACK_EN, 32'h1);
    run_counts(80, mean, mn, mx);
    b_run = 1'b0;
    #(20_000_000);
    check(n_mismatch == 0, $sformatf("%0d of %0d received bytes differ", n_mismatch, n_rx));
    check(rx_errors == 0, "UART framing");
    check(expq.size() == 0, $sformatf("%0d bytes never received", expq.size()));
    $display("counts=%0d bytes=%0d overruns=%0d", n_cnt, n_rx, n_overrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
