// tb_parameter_sets: runs the whole TRNG with the MMCM parameter sets of
// the evaluation, one system instance per set, all in parallel.
//
// Sets (M, D, Q for Clk_A, then Clk_B; M and Q as eight times the value):
// the simply ported sets J01 (NM), the jittery JT variants of J01 and J22,
// J23 in NM, the combined CB sets J01, J02, J21, J23, the full-search sets
// A01-A03 and E63-E65, E10, and the six integer-only sets D17, E25, E31,
// E57, E58, D63 used for run-time reconfiguration.  For each, the window
// WIN (samples per count, N/K) follows from the clock ratio:
// f_A/f_B = K + 1/WIN, i.e. the denominator of the reduced ratio; for the
// integer-only sets it equals the N printed with them (64, 61, 61, 59, 61,
// 31).  Each instance starts with N = WIN.  Every MMCM model also checks
// its set against the Artix-7 limits at elaboration.
//
// Per set, 48 counts after settling are checked for:
//  - mean within 4 standard errors (+0.5) of WIN/2, the expected count,
//    where the standard error comes from the measured spread;
//  - rate: 48 windows take 48 * WIN * T_B, T_B = 10 ns * D_B*Q_B/M_B,
//    measured in 10 ns cycles to +-2.
// Jitter: 142 ps peak-to-peak for D = 1 and 427 ps for D = 8 or more, the
// two ends of the vendor figures for M/D = 7.75.
module tb_parameter_sets;
  timeunit 1ps;
  timeprecision 1fs;
  import trng_pkg::*;

  localparam int NSETS = 21;
  localparam int M8A [NSETS] = '{60, 480, 480, 504, 480, 62, 496, 464, 480, 480, 500, 504, 512, 512, 496, 456, 480, 504, 512, 456, 464};
  localparam int DA  [NSETS] = '{1, 8, 8, 6, 8, 1, 8, 8, 10, 10, 10, 8, 8, 8, 8, 8, 10, 9, 8, 8, 8};
  localparam int Q8A [NSETS] = '{124, 124, 62, 44, 62, 64, 32, 30, 8, 8, 8, 8, 8, 8, 8, 8, 8, 8, 8, 8, 8};
  localparam int M8B [NSETS] = '{56, 504, 504, 480, 464, 60, 480, 504, 468, 464, 495, 486, 490, 456, 480, 512, 488, 488, 472, 488, 496};
  localparam int DB  [NSETS] = '{1, 9, 9, 6, 8, 1, 8, 9, 9, 8, 9, 9, 10, 8, 8, 8, 8, 8, 8, 8, 8};
  localparam int Q8B [NSETS] = '{116, 116, 116, 84, 60, 62, 62, 58, 61, 68, 62, 103, 92, 107, 62, 72, 112, 96, 96, 120, 120};
  localparam int WIN [NSETS] = '{434, 434, 217, 220, 899, 960, 480, 420, 26, 29, 22, 48, 49, 57, 120, 64, 61, 61, 59, 61, 31};
  localparam string NAMES [NSETS] = '{"J01 NM", "J01 JT", "J01 CB", "J02 CB", "J22 JT", "J23 NM", "J23 CB",
                                      "J21 CB", "A01 CB", "A02 CB", "A03 CB", "E63 CB", "E64 CB", "E65 CB",
                                      "E10 CB", "D17", "E25", "E31", "E57", "E58", "D63"};
  localparam int NUM = 48;

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

  longint unsigned cyc = 0;
  always @(posedge clk_in) cyc++;

  bit done [NSETS];

  for (genvar i = 0; i < NSETS; i++) begin : g_set
    logic        awready, wready, bvalid, arready, rvalid, txd, oe, overrun, locked;
    logic [1:0]  bresp, rresp;
    logic [31:0] rdata;
    cnt_t        cnt;

    mmcm_trng_system #(
      .M8_A(M8A[i]), .D_A(DA[i]), .Q8_A(Q8A[i]),
      .M8_B(M8B[i]), .D_B(DB[i]), .Q8_B(Q8B[i]),
      .JITTER_A_PS(DA[i] == 1 ? 142 : 427), .JITTER_B_PS(DB[i] == 1 ? 142 : 427),
      .N_DEFAULT(cnt_t'(WIN[i]))
    ) dut (
      .clk_in, .rst,
      .s_axi_awaddr('0), .s_axi_awvalid(1'b0), .s_axi_awready(awready),
      .s_axi_wdata('0), .s_axi_wstrb('0), .s_axi_wvalid(1'b0), .s_axi_wready(wready),
      .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(1'b1),
      .s_axi_araddr('0), .s_axi_arvalid(1'b0), .s_axi_arready(arready),
      .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(1'b1),
      .txd, .cnt, .oe, .overrun, .locked
    );

    initial begin
      real s, s2, mean, sd, tol, exp_cyc;
      longint unsigned t0;
      int mn, mx;
      done[i] = 0;
      s = 0; s2 = 0; mn = 1 << 30; mx = 0;
      wait (!rst);
      repeat (3) do @(posedge clk_in); while (!oe);   // settle
      do @(posedge clk_in); while (!oe);
      t0 = cyc;
      for (int k = 0; k < NUM; k++) begin
        do @(posedge clk_in); while (!oe);
        s  += real'(cnt);
        s2 += real'(cnt) * real'(cnt);
        if (cnt < mn) mn = cnt;
        if (cnt > mx) mx = cnt;
      end
      mean    = s / NUM;
      sd      = $sqrt(s2 / NUM - mean * mean);
      tol     = 4.0 * sd / $sqrt(real'(NUM)) + 0.5;
      exp_cyc = real'(NUM) * WIN[i] * (1.0e4 * DB[i] * Q8B[i] / M8B[i]) / 1.0e4;
      $display("%-7s N=%0d: mean %0.2f (expected %0.1f) sd %0.2f range %0d..%0d, %0d cycles (expected %0.1f)",
               NAMES[i], WIN[i], mean, WIN[i] / 2.0, sd, mn, mx, cyc - t0, exp_cyc);
      check(mean > WIN[i] / 2.0 - tol && mean < WIN[i] / 2.0 + tol,
            $sformatf("%s mean count %0.2f", NAMES[i], mean));
      check(real'(cyc - t0) >= exp_cyc - 2.0 && real'(cyc - t0) <= exp_cyc + 2.0,
            $sformatf("%s rate: %0d cycles", NAMES[i], cyc - t0));
      done[i] = 1;
    end
  end

  initial begin : watchdog
    #(30_000_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    #200_000;
    rst = 1'b0;
    do begin
      #1_000_000;
      all_done = 1;
      foreach (done[i]) all_done &= done[i];
    end while (!all_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
