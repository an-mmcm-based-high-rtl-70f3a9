// uart_tx: UART transmitter, 8 data bits, no parity, one stop bit (8N1).
//
// It sends each accepted byte LSB first after a start bit.  Bit timing
// comes from a fractional divider: an accumulator adds BAUD every clock
// and a bit ends whenever it passes CLK_HZ, so the average rate is exact
// even when CLK_HZ/BAUD is not an integer (100 MHz / 6 Mbit/s gives bits
// of 16 or 17 cycles).  The 3 and 6 Mbit/s rates are the paper's; the
// frame format and the divider are this design's choice.
//
// Handshake: in_ready is high while the transmitter is idle and in the
// last cycle of a stop bit, so frames can follow each other without a
// gap; a byte is taken when in_valid and in_ready are both high and its
// start bit begins on the next cycle.  A frame lasts 10 bit times.  txd
// idles high.
module uart_tx #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 6_000_000
) (
  input  logic       clk,
  input  logic       rst,       // synchronous, active high
  input  logic [7:0] in_data,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       txd
);
  timeunit 1ps;
  timeprecision 1fs;

  if (BAUD == 0 || BAUD > CLK_HZ) begin : g_chk_baud
    $error("uart_tx: BAUD must be between 1 and CLK_HZ");
  end

  logic [7:0]  shreg;    // data bits still to send, LSB first
  logic [3:0]  bits_left;
  logic [31:0] acc;
  logic        busy;
  logic        tick;      // current bit ends with this cycle
  logic        last;      // stop bit ends with this cycle

  assign tick     = (acc + BAUD) >= CLK_HZ;
  assign last     = busy && tick && (bits_left == 4'd1);
  assign in_ready = !busy || last;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '1;
      bits_left <= '0;
      acc       <= '0;
      busy      <= 1'b0;
      txd       <= 1'b1;
    end else if (in_ready && in_valid) begin
      // Start a frame; after a stop bit keep the divider's fraction so
      // back-to-back frames run at the exact average rate.
      busy      <= 1'b1;
      shreg     <= in_data;
      bits_left <= 4'd10;   // start, 8 data, stop
      acc       <= busy ? acc + BAUD - CLK_HZ : '0;
      txd       <= 1'b0;    // start bit
    end else if (busy) begin
      if (tick) begin
        acc       <= acc + BAUD - CLK_HZ;
        bits_left <= bits_left - 1'b1;
        if (bits_left == 4'd1) begin
          busy <= 1'b0;
          txd  <= 1'b1;
        end else begin
          shreg <= {1'b1, shreg[7:1]};
          txd   <= shreg[0];
        end
      end else begin
        acc <= acc + BAUD;
      end
    end
  end
endmodule
