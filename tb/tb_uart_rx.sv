// tb_uart_rx: UART receiver model for testbenches (8N1, LSB first).
//
// It waits for a falling edge on rxd, samples the middle of the start bit,
// the eight data bits and the stop bit at the nominal bit time BIT_PS, and
// then publishes the byte on data and increments count; a user waits on
// count.  A start bit that is not low at its middle, or a stop bit that is
// not high, is counted in errors.
module tb_uart_rx #(
  parameter real BIT_PS = 1.0e12 / 6.0e6
) (
  input  logic       rxd,
  output logic [7:0] data,
  output int         count,
  output int         errors
);
  timeunit 1ps;
  timeprecision 1fs;

  initial begin
    logic [7:0] b;
    data   = '0;
    count  = 0;
    errors = 0;
    #1;
    forever begin
      @(negedge rxd);
      #(BIT_PS * 0.5);
      if (rxd !== 1'b0) errors++;
      for (int i = 0; i < 8; i++) begin
        #(BIT_PS);
        b[i] = rxd;
      end
      #(BIT_PS);
      if (rxd !== 1'b1) errors++;
      data = b;
      count++;
    end
  end
endmodule
