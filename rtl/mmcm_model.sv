// mmcm_model: behavioural model (not synthesizable) of a Xilinx 7-series
// mixed-mode clock manager (MMCM) used as a fixed frequency synthesizer.
//
// The real part divides its input by D, locks a VCO to M times that
// (f_VCO = M/D * f_IN) and divides the VCO by Q for the output, so
// f_OUT = M/(D*Q) * f_IN.  M and Q are set in steps of 1/8 and are
// therefore given here as M8 = 8*M and Q8 = 8*Q.  The analog loop is
// not modelled.  Instead the model places output edge k at the ideal time
// k * D*Q/(2*M) * T_IN, counted from time zero, so two instances keep the
// exact rational frequency ratio that coherent sampling relies on.  Each
// edge is then moved by a uniform random offset whose full width is the
// peak-to-peak jitter JITTER_PP_PS; this stands in for the clock jitter
// that supplies the entropy.  The output frequency comes from the
// parameter F_IN_KHZ; CLKIN1 only clocks the lock counter.
//
// Elaboration fails if D, M or Q, or the PFD, VCO or output frequency,
// leave the Artix-7 (-1) limits.  The defaults are Clk_A of parameter set
// E10 in the CB method (M = 62, D = 8, Q = 1 -> 775 MHz) with the 427 ps
// peak-to-peak jitter the vendor tool reports for M = 62, D = 8.
//
// Ports follow the MMCME2 primitive: CLKIN1, RST (active high, output held
// low, LOCKED cleared), CLKOUT0 and LOCKED, which rises LOCK_CYCLES input
// clock cycles after RST falls.  The lock time is this model's choice.
module mmcm_model #(
  parameter int unsigned M8           = 496,
  parameter int unsigned D            = 8,
  parameter int unsigned Q8           = 8,
  parameter int unsigned F_IN_KHZ     = trng_pkg::F_IN_KHZ,
  parameter int unsigned JITTER_PP_PS = 427,
  parameter int unsigned LOCK_CYCLES  = 64
) (
  input  logic CLKIN1,
  input  logic RST,
  output logic CLKOUT0,
  output logic LOCKED
);
  timeunit 1ps;
  timeprecision 1fs;
  import trng_pkg::*;

  // ---- parameter limits (elaboration-time) --------------------------------
  localparam longint unsigned F_PFD_KHZ8 = longint'(F_IN_KHZ) * 8 / longint'(D);      // 8*f_PFD
  localparam longint unsigned F_VCO_KHZ8 = longint'(F_IN_KHZ) * M8 / longint'(D);     // 8*f_VCO
  localparam longint unsigned F_OUT_KHZ  = longint'(F_IN_KHZ) * M8 / (longint'(D) * Q8);

  if (D < MMCM_D_MIN || D > MMCM_D_MAX) begin : g_chk_d
    $error("mmcm_model: D=%0d out of range", D);
  end
  if (M8 < MMCM_M8_MIN || M8 > MMCM_M8_MAX) begin : g_chk_m
    $error("mmcm_model: M8=%0d out of range", M8);
  end
  if (Q8 < MMCM_Q8_MIN || Q8 > MMCM_Q8_MAX) begin : g_chk_q
    $error("mmcm_model: Q8=%0d out of range", Q8);
  end
  if (F_PFD_KHZ8 < 8 * longint'(MMCM_PFD_MIN_KHZ) || F_PFD_KHZ8 > 8 * longint'(MMCM_PFD_MAX_KHZ)) begin : g_chk_pfd
    $error("mmcm_model: PFD frequency out of range");
  end
  if (F_VCO_KHZ8 < 8 * longint'(MMCM_VCO_MIN_KHZ) || F_VCO_KHZ8 > 8 * longint'(MMCM_VCO_MAX_KHZ)) begin : g_chk_vco
    $error("mmcm_model: VCO frequency out of range");
  end
  if (F_OUT_KHZ < longint'(MMCM_OUT_MIN_KHZ) || F_OUT_KHZ > longint'(MMCM_OUT_MAX_KHZ)) begin : g_chk_out
    $error("mmcm_model: output frequency out of range");
  end

  // ---- edge timing (femtoseconds) -----------------------------------------
  // Input period in fs: 1 kHz has a period of 1e12 fs.
  localparam longint unsigned T_IN_FS  = 64'd1_000_000_000_000 / longint'(F_IN_KHZ);
  // Ideal time of half-period edge k is k * EDGE_NUM / EDGE_DEN.
  localparam longint unsigned EDGE_NUM = T_IN_FS * D * Q8;
  localparam longint unsigned EDGE_DEN = 2 * longint'(M8);
  localparam int unsigned     JIT_FS   = JITTER_PP_PS * 1000;

  // The output starts only at a falling edge of the internal clock, so
  // leaving reset never produces a short first pulse.
  logic clk_q = 1'b0;
  logic run   = 1'b0;
  assign CLKOUT0 = clk_q & run & ~RST;

  initial begin : gen
    longint unsigned k;
    longint          now_fs, next_fs, wait_fs, ofs;
    k       = 0;
    forever begin
      k++;
      ofs     = (JIT_FS == 0) ? 0 : longint'($urandom_range(JIT_FS)) - longint'(JIT_FS) / 2;
      next_fs = longint'(k * EDGE_NUM / EDGE_DEN) + ofs;
      // Wait relative to the simulator's actual time so that rounding to
      // the time precision never accumulates.
      now_fs  = longint'($realtime * 1000.0);
      wait_fs = next_fs - now_fs;
      if (wait_fs < 1) wait_fs = 1;
      #(real'(wait_fs) * 1.0e-3);
      if (!k[0]) run = ~RST;
      clk_q   = k[0];
    end
  end

  // ---- lock indication ----------------------------------------------------
  int unsigned lock_cnt;
  always_ff @(posedge CLKIN1 or posedge RST) begin
    if (RST) begin
      lock_cnt <= 0;
      LOCKED   <= 1'b0;
    end else if (lock_cnt < LOCK_CYCLES) begin
      lock_cnt <= lock_cnt + 1;
    end else begin
      LOCKED   <= 1'b1;
    end
  end
endmodule
