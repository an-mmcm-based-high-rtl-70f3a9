// trng_module: the TRNG core without its clock generators.
//
// It joins the AXI-Lite parameter registers, the coherent sampler, the
// data packer and the UART transmitter.  Clk_A and Clk_B come from two
// MMCMs outside; everything except the sampler's Clk_B counters runs on
// the 100 MHz system clock.  The sampler delivers one counter value (cnt,
// oe) every N Clk_B periods; the packer turns eight LSBs into a byte, or
// each counter value into two bytes, and the UART sends the bytes on txd.
// This is the paper's block structure; the register map and the byte
// formats are this design's (see the submodules).
//
// The raw counter values and the drop indication are also brought out as
// ports for monitoring.  With no AXI writes the module runs on the
// N_DEFAULT / PACK_EN_DEFAULT constants, like a build with fixed values.
module trng_module
  import trng_pkg::*;
#(
  parameter cnt_t        N_DEFAULT       = cnt_t'(120),
  parameter bit          PACK_EN_DEFAULT = 1'b1,
  parameter int unsigned CLK_HZ          = 100_000_000,
  parameter int unsigned BAUD            = 6_000_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        clk_a,
  input  logic        clk_b,
  // AXI-Lite slave
  input  logic [3:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [3:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  // outputs
  output logic        txd,
  output cnt_t        cnt,
  output logic        oe,
  output logic        overrun
);
  timeunit 1ps;
  timeprecision 1fs;

  cnt_t  n_samples;
  logic  pack_en;
  byte_t out_data;
  logic  out_valid, out_ready;

  trng_axi_regs #(
    .N_DEFAULT      (N_DEFAULT),
    .PACK_EN_DEFAULT(PACK_EN_DEFAULT)
  ) u_axi (
    .clk, .rst,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .n_samples, .pack_en
  );

  coherent_sampling u_cs (
    .clk, .rst, .clk_a, .clk_b,
    .n_samples,
    .cnt, .oe
  );

  data_packer u_pack (
    .clk, .rst, .pack_en,
    .in_cnt   (cnt),
    .in_valid (oe),
    .out_data, .out_valid, .out_ready,
    .overrun
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk, .rst,
    .in_data  (out_data),
    .in_valid (out_valid),
    .in_ready (out_ready),
    .txd
  );
endmodule
