// tb_trng_axi_regs: self-checking test of the AXI-Lite parameter registers.
//
// A small AXI-Lite master in the testbench writes and reads the N and
// PACK_EN registers with random delays on the address, data and response
// channels.  Checks: reset values (the N_DEFAULT / PACK_EN_DEFAULT
// overrides chosen here), that written values reach the n_samples and
// pack_en outputs and read back, that byte strobes mask lanes (writing
// only lane 1 of N changes bits 9:8 only), that N keeps ten bits, and that
// an unmapped offset answers SLVERR and changes nothing.
module tb_trng_axi_regs;
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

  logic clk = 1'b0, rst = 1'b1;
  always #5000 clk = ~clk;

  logic [3:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = '0;
  logic [3:0]  wstrb = '0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic [31:0] rdata;
  cnt_t        n_samples;
  logic        pack_en;

  trng_axi_regs #(.N_DEFAULT(cnt_t'(77)), .PACK_EN_DEFAULT(1'b0)) dut (
    .clk, .rst,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .n_samples, .pack_en
  );

  task automatic axi_write(logic [3:0] a, logic [31:0] d, logic [3:0] s, output logic [1:0] resp);
    bit aw_done = 0, w_done = 0;
    @(negedge clk);
    // address and data may start in different cycles
    repeat ($urandom_range(2)) @(negedge clk);
    awaddr = a; awvalid = 1;
    if ($urandom_range(1)) @(negedge clk);
    wdata = d; wstrb = s; wvalid = 1;
    while (!(aw_done && w_done)) begin
      @(posedge clk);
      if (awready) aw_done = 1;
      if (wready)  w_done  = 1;
      @(negedge clk);
      if (aw_done) awvalid = 0;
      if (w_done)  wvalid  = 0;
    end
    repeat ($urandom_range(3)) @(negedge clk);
    bready = 1;
    do @(posedge clk); while (!bvalid);
    resp = bresp;
    @(negedge clk) bready = 0;
  endtask

  task automatic axi_read(logic [3:0] a, output logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk) arvalid = 0;
    repeat ($urandom_range(3)) @(negedge clk);
    rready = 1;
    do @(posedge clk); while (!rvalid);
    d = rdata; resp = rresp;
    @(negedge clk) rready = 0;
  endtask

  initial begin : watchdog
    #(100_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d; logic [1:0] r;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check(n_samples == 77 && pack_en == 1'b0, "reset values");
    axi_read(REG_N, d, r);
    check(d == 77 && r == AXI_OKAY, $sformatf("read N after reset: %0d", d));

    for (int i = 0; i < 20; i++) begin
      int unsigned n = $urandom_range(1023);
      bit p = 1'($urandom);
      axi_write(REG_N, 32'(n) | 32'hFFFF_FC00, 4'hF, r);
      check(r == AXI_OKAY && n_samples == cnt_t'(n), $sformatf("write N=%0d", n));
      axi_write(REG_PACK_EN, 32'(p), 4'hF, r);
      check(r == AXI_OKAY && pack_en == p, "write PACK_EN");
      axi_read(REG_N, d, r);
      check(d == 32'(n) && r == AXI_OKAY, $sformatf("read N %0d got %0d", n, d));
      axi_read(REG_PACK_EN, d, r);
      check(d == 32'(p) && r == AXI_OKAY, "read PACK_EN");
    end

    // Byte strobes: only lane 1 (bits 15:8) of N.
    axi_write(REG_N, 32'h0000_0155, 4'hF, r);
    axi_write(REG_N, 32'h0000_02AA, 4'b0010, r);
    check(n_samples == cnt_t'(10'h255), $sformatf("strobe lane 1: N=%03x", n_samples));
    axi_write(REG_PACK_EN, 32'h1, 4'b0000, r);
    axi_read(REG_PACK_EN, d, r);
    check(d[0] == pack_en, "PACK_EN write without strobe keeps the value");

    // Unmapped offset.
    axi_write(4'hC, 32'h3, 4'hF, r);
    check(r == AXI_SLVERR && n_samples == cnt_t'(10'h255), "write to unmapped offset");
    axi_read(4'h8, d, r);
    check(r == AXI_SLVERR && d == 0, "read from unmapped offset");

    rst = 1;
    @(posedge clk); #1;
    check(n_samples == 77 && pack_en == 1'b0 && !bvalid && !rvalid, "reset restores defaults");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
