// mmcm_trng_system: MMCM-based true random number generator, top level.
//
// Two MMCMs synthesize Clk_A and Clk_B from the 100 MHz board clock with a
// frequency ratio of K*(N+1) : N; the TRNG module samples Clk_A with Clk_B,
// counts the '1's in every window of N/K samples and sends the LSBs (or the
// whole counts) over a UART.  The defaults are parameter set E10 in the
// combined (CB) method of the paper: Clk_A = 100 MHz * 62/(8*1) =
// 775 MHz, Clk_B = 100 MHz * 60/(8*7.75) = 96.774 MHz, ratio 8*961 : 960,
// so K = 8 and a window of N/K = 120 samples, one random bit per 1.24 us
// (0.806 Mbit/s).  M and Q are given as eight times their value.
//
// The MMCMs are behavioural models (see mmcm_model) and this top is for
// simulation; on an FPGA they are MMCME2 primitives with the same
// settings.  Run-time reconfiguration of the MMCMs themselves is outside
// this design; N and Pack_EN can be changed through the AXI-Lite port,
// whose master (a processor and interconnect) lies outside too.  The
// system reset is held until both MMCMs report lock; everything but the
// sampler's Clk_B counters runs on clk_in.
module mmcm_trng_system
  import trng_pkg::*;
#(
  parameter int unsigned M8_A            = 496,   // M_A = 62.000
  parameter int unsigned D_A             = 8,
  parameter int unsigned Q8_A            = 8,     // Q_A = 1.000
  parameter int unsigned M8_B            = 480,   // M_B = 60.000
  parameter int unsigned D_B             = 8,
  parameter int unsigned Q8_B            = 62,    // Q_B = 7.750
  parameter int unsigned JITTER_A_PS     = 427,
  parameter int unsigned JITTER_B_PS     = 427,
  parameter cnt_t        N_DEFAULT       = cnt_t'(120),
  parameter bit          PACK_EN_DEFAULT = 1'b1,
  parameter int unsigned BAUD            = 6_000_000
) (
  input  logic        clk_in,         // 100 MHz board clock
  input  logic        rst,            // asynchronous, active high
  // AXI-Lite slave (from the processor's interconnect)
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
  output logic        overrun,
  output logic        locked
);
  timeunit 1ps;
  timeprecision 1fs;

  logic clk_a, clk_b, locked_a, locked_b, rst_sys;

  mmcm_model #(.M8(M8_A), .D(D_A), .Q8(Q8_A), .F_IN_KHZ(F_IN_KHZ),
               .JITTER_PP_PS(JITTER_A_PS)) u_mmcm_a (
    .CLKIN1(clk_in), .RST(rst), .CLKOUT0(clk_a), .LOCKED(locked_a)
  );

  mmcm_model #(.M8(M8_B), .D(D_B), .Q8(Q8_B), .F_IN_KHZ(F_IN_KHZ),
               .JITTER_PP_PS(JITTER_B_PS)) u_mmcm_b (
    .CLKIN1(clk_in), .RST(rst), .CLKOUT0(clk_b), .LOCKED(locked_b)
  );

  assign locked = locked_a && locked_b;

  reset_sync #(.STAGES(2)) u_rst (.clk(clk_in), .arst(rst || !locked), .rst(rst_sys));

  trng_module #(
    .N_DEFAULT      (N_DEFAULT),
    .PACK_EN_DEFAULT(PACK_EN_DEFAULT),
    .CLK_HZ         (F_IN_KHZ * 1000),
    .BAUD           (BAUD)
  ) u_trng (
    .clk(clk_in), .rst(rst_sys), .clk_a, .clk_b,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .txd, .cnt, .oe, .overrun
  );
endmodule
