// tb_data_packer: self-checking test of the data packer.
//
// Random counter values arrive at random intervals; the UART side takes
// bytes with random stalls, including long ones that force buffer
// overruns.  The testbench builds the expected byte stream itself: in
// packed mode one byte per eight counts, the LSB of the first count in
// bit 0; in unpacked mode two bytes per count, low byte first.  An
// overrun pulse one cycle after an input removes the data that input would
// have produced.  Every output byte must match the expected stream in
// order, nothing may be left over, and both modes must see overruns and
// mode switches (which discard a partial byte) at least once.
module tb_data_packer;
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

  logic  clk = 1'b0, rst = 1'b1;
  always #5000 clk = ~clk;

  logic  pack_en = 1'b1;
  cnt_t  in_cnt = '0;
  logic  in_valid = 1'b0;
  byte_t out_data;
  logic  out_valid, out_ready = 1'b0, overrun;

  data_packer dut (.clk, .rst, .pack_en, .in_cnt, .in_valid,
                   .out_data, .out_valid, .out_ready, .overrun);

  byte_t expq[$];       // expected bytes
  int    last_push = 0; // bytes pushed by the previous cycle's input
  byte_t acc;           // reference packing state
  int    nacc = 0;
  int    n_out = 0, n_overrun_p = 0, n_overrun_u = 0, n_mismatch = 0;

  // Reference model, evaluated on the same edges as the DUT.
  always @(posedge clk) if (!rst) begin
    int pushed;
    // Drops caused by last cycle's input.
    if (overrun) begin
      if (pack_en) n_overrun_p++; else n_overrun_u++;
      repeat (last_push) void'(expq.pop_back());
    end
    // Consume an output byte.
    if (out_valid && out_ready) begin
      n_out++;
      if (expq.size() == 0 || expq[0] != out_data) begin
        n_mismatch++;
        if (n_mismatch < 5)
          $display("mismatch: got %02x expected %02x (queue %0d)", out_data,
                   expq.size() ? expq[0] : 8'hxx, expq.size());
      end
      if (expq.size()) void'(expq.pop_front());
    end
    pushed = 0;
    if (!pack_en) nacc = 0;
    if (in_valid) begin
      if (pack_en) begin
        acc[nacc] = in_cnt[0];
        nacc++;
        if (nacc == 8) begin
          expq.push_back(acc);
          nacc = 0;
          pushed = 1;
        end
      end else begin
        expq.push_back(in_cnt[7:0]);
        expq.push_back(byte_t'(in_cnt >> 8));
        pushed = 2;
      end
    end
    last_push = pushed;
  end

  // Stimulus: input side.
  int stall_mode = 0;  // 0: UART always ready, 1: random, 2: long stalls
  always @(posedge clk) begin
    if (rst) begin
      in_valid <= 1'b0;
    end else begin
      in_valid <= ($urandom_range(3) == 0);
      in_cnt   <= cnt_t'($urandom_range(1023));
    end
  end
  always @(posedge clk) begin
    case (stall_mode)
      0: out_ready <= 1'b1;
      1: out_ready <= ($urandom_range(1) == 0);
      default: out_ready <= ($urandom_range(40) == 0);
    endcase
  end

  initial begin : watchdog
    #(1_000_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mode_switches = 0;
  initial begin
    repeat (4) @(posedge clk);
    check(!out_valid, "buffer empty after reset");
    @(negedge clk) rst = 1'b0;
    for (int phase = 0; phase < 12; phase++) begin
      @(negedge clk);
      stall_mode = phase % 3;
      if (phase % 2 == 1) begin
        pack_en = ~pack_en;
        mode_switches++;
      end
      repeat (600) @(posedge clk);
    end
    // Drain.
    @(negedge clk);
    stall_mode = 0;
    force in_valid = 1'b0;
    repeat (20) @(posedge clk);
    check(n_mismatch == 0, $sformatf("%0d output bytes differ from the reference", n_mismatch));
    check(expq.size() == 0, $sformatf("%0d expected bytes never came out", expq.size()));
    check(n_out > 500, $sformatf("%0d bytes sent", n_out));
    check(n_overrun_p > 0, $sformatf("packed-mode overruns: %0d", n_overrun_p));
    check(n_overrun_u > 0, $sformatf("unpacked-mode overruns: %0d", n_overrun_u));
    check(mode_switches >= 4, "mode switches");
    $display("bytes=%0d overruns packed=%0d unpacked=%0d", n_out, n_overrun_p, n_overrun_u);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
