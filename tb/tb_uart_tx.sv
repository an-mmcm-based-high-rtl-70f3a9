// tb_uart_tx: self-checking test of the UART transmitter.
//
// Runs the transmitter at 100 MHz and 6 Mbit/s (16.67 clock cycles per
// bit, so the divider must alternate 16 and 17).  A receiver model in the
// testbench finds each start bit and samples the line in the middle of
// every bit at the nominal rate, checking the start bit, the eight data
// bits LSB first and the stop bit.  Bytes are random, sent back to back
// and with random gaps; in_ready must stay low for the whole frame.  The
// time for 64 back-to-back frames must be 64*10/6e6 s = 10667 cycles +-2.
module tb_uart_tx;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned CLK_HZ = 100_000_000;
  localparam int unsigned BAUD   = 6_000_000;
  localparam real BIT_PS = 1.0e12 / BAUD;

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

  logic [7:0] in_data = '0;
  logic       in_valid = 1'b0, in_ready, txd;

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.clk, .rst, .in_data, .in_valid, .in_ready, .txd);

  logic [7:0] sent[$];
  int n_rx = 0, n_bad = 0;

  // Receiver model.
  initial begin
    logic [7:0] b;
    @(negedge rst);
    forever begin
      @(negedge txd);
      #(BIT_PS * 0.5);
      if (txd !== 1'b0) begin n_bad++; $display("bad start bit"); end
      for (int i = 0; i < 8; i++) begin
        #(BIT_PS);
        b[i] = txd;
      end
      #(BIT_PS);
      if (txd !== 1'b1) begin n_bad++; $display("bad stop bit"); end
      n_rx++;
      if (sent.size() == 0 || sent[0] != b) begin
        n_bad++;
        $display("received %02x, expected %02x", b, sent.size() ? sent[0] : 8'h00);
      end
      if (sent.size()) void'(sent.pop_front());
    end
  end

  int busy_violations = 0;
  task automatic send(logic [7:0] d);
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    in_data  = d;
    in_valid = 1'b1;
    sent.push_back(d);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin : watchdog
    #(1_000_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    longint unsigned t0, t1;
    repeat (4) @(posedge clk);
    check(txd == 1'b1, "line idles high in reset");
    @(negedge clk) rst = 1'b0;
    // Random gaps.
    for (int i = 0; i < 40; i++) begin
      send(8'($urandom));
      repeat ($urandom_range(300)) @(posedge clk);
    end
    // Back to back, with the frame time measured.
    wait (in_ready);
    @(posedge clk);
    t0 = cyc;
    for (int i = 0; i < 64; i++) begin
      send(8'($urandom));
      // in_ready must stay low during the frame.
      repeat (150) begin
        @(posedge clk);
        if (in_ready) busy_violations++;
      end
    end
    wait (in_ready);
    t1 = cyc;
    check(t1 - t0 >= 10665 && t1 - t0 <= 10671,
          $sformatf("64 frames took %0d cycles, expected about 10667", t1 - t0));
    #(BIT_PS * 3);
    check(busy_violations == 0, "in_ready low during frames");
    check(n_bad == 0, $sformatf("%0d receive errors", n_bad));
    check(n_rx == 104, $sformatf("%0d bytes received, expected 104", n_rx));
    check(sent.size() == 0, "all bytes received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
