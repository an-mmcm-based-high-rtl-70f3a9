// trng_pkg: types and constants shared by the MMCM-based TRNG.
//
// The counter width follows the ten bits the control software writes for
// N (the number of Clk_B samples per count).  The clocking limits are those
// of an Artix-7 MMCM in speed grade -1 with a 100 MHz input clock; the
// behavioural MMCM model checks its parameters against them.  The register
// offsets of the AXI-Lite slave are this design's own choice.
package trng_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  // Counter values and the sample count N are ten bits wide.
  localparam int unsigned CNT_W = 10;
  typedef logic [CNT_W-1:0] cnt_t;
  typedef logic [7:0]       byte_t;

  // Board input clock.
  localparam int unsigned F_IN_KHZ = 100_000;

  // Smallest window the clock-domain handover supports (Clk_B at most as
  // fast as the system clock); smaller N values are raised to it.
  localparam int unsigned N_MIN = 8;

  // MMCM limits: D, M and Q ranges and PFD, VCO and output frequencies.
  // M and Q are kept as eight times their value (1/8 steps).
  localparam int unsigned MMCM_D_MIN      = 1;
  localparam int unsigned MMCM_D_MAX      = 106;
  localparam int unsigned MMCM_M8_MIN     = 2 * 8;
  localparam int unsigned MMCM_M8_MAX     = 64 * 8;
  localparam int unsigned MMCM_Q8_MIN     = 1 * 8;
  localparam int unsigned MMCM_Q8_MAX     = 128 * 8;
  localparam int unsigned MMCM_PFD_MIN_KHZ = 10_000;
  localparam int unsigned MMCM_PFD_MAX_KHZ = 450_000;
  localparam int unsigned MMCM_VCO_MIN_KHZ = 600_000;
  localparam int unsigned MMCM_VCO_MAX_KHZ = 1_200_000;
  localparam int unsigned MMCM_OUT_MIN_KHZ = 4_680;
  localparam int unsigned MMCM_OUT_MAX_KHZ = 800_000;

  // AXI-Lite register map of the TRNG module (byte offsets).
  localparam logic [3:0] REG_N       = 4'h0;  // bits 9:0  : N
  localparam logic [3:0] REG_PACK_EN = 4'h4;  // bit 0     : Pack_EN

  typedef enum logic [1:0] {
    AXI_OKAY   = 2'b00,
    AXI_SLVERR = 2'b10
  } axi_resp_e;
endpackage
