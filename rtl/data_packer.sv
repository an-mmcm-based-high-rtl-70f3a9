// data_packer: turns counter values into the byte stream for the UART.
//
// With pack_en high it keeps only the LSB of each counter value, the
// random bit, and packs eight of them into one byte; the first bit of a
// byte lands in bit 0, so a UART that sends LSB first puts the bits on the
// line in the order they were generated.  With pack_en low it forwards
// every whole counter value as two bytes, low byte first, then the upper
// bits zero-extended; this is how the counter distributions are read out.
// Packing eight LSBs per byte and the Pack_EN switch are the paper's;
// the bit order, the two-byte format and the buffer are this design's.
//
// Bytes wait in a two-entry buffer with a valid/ready output.  A packed
// byte needs one free entry, an unpacked value two; if there is no room
// the data is dropped and overrun pulses for one cycle, so random bits are
// lost whole rather than stalled.  Clearing pack_en also clears a partly
// filled byte.  A counter value on in_valid becomes an output byte on the
// next cycle.
module data_packer
  import trng_pkg::*;
(
  input  logic  clk,
  input  logic  rst,        // synchronous, active high
  input  logic  pack_en,    // 1: pack LSBs, 0: send whole counter values
  input  cnt_t  in_cnt,     // counter value
  input  logic  in_valid,   // in_cnt valid (OE of the sampler)
  output byte_t out_data,
  output logic  out_valid,
  input  logic  out_ready,
  output logic  overrun     // data dropped for lack of buffer space
);
  timeunit 1ps;
  timeprecision 1fs;

  logic  [6:0] sr;        // bits collected so far, oldest in the low bit
  logic  [2:0] nbits;     // number of bits collected
  byte_t       buf_q [2]; // output buffer, entry 0 is the head
  logic  [1:0] nbytes;    // filled entries

  logic  pop;
  byte_t packed_byte;
  logic  byte_done;

  assign pop         = out_valid && out_ready;
  assign packed_byte = {in_cnt[0], sr};
  assign byte_done   = pack_en && in_valid && (nbits == 3'd7);
  assign out_valid   = (nbytes != 2'd0);
  assign out_data    = buf_q[0];

  always_ff @(posedge clk) begin
    logic [1:0] n;
    if (rst) begin
      sr      <= '0;
      nbits   <= '0;
      nbytes  <= '0;
      overrun <= 1'b0;
      buf_q[0] <= '0;
      buf_q[1] <= '0;
    end else begin
      overrun <= 1'b0;
      n = nbytes;
      if (pop) begin
        buf_q[0] <= buf_q[1];
        n = n - 1'b1;
      end

      if (!pack_en) begin
        nbits <= '0;
        if (in_valid) begin
          if (n == 2'd0) begin
            buf_q[0] <= in_cnt[7:0];
            buf_q[1] <= byte_t'(in_cnt >> 8);
            n = 2'd2;
          end else begin
            overrun <= 1'b1;
          end
        end
      end else if (in_valid) begin
        sr    <= packed_byte[7:1];
        nbits <= nbits + 1'b1;
        if (byte_done) begin
          if (n == 2'd0) begin
            buf_q[0] <= packed_byte;
            n = 2'd1;
          end else if (n == 2'd1) begin
            buf_q[1] <= packed_byte;
            n = 2'd2;
          end else begin
            overrun <= 1'b1;
          end
        end
      end
      nbytes <= n;
    end
  end

  // The output byte must stay put while it waits for the UART.
  a_hold: assert property (@(posedge clk) disable iff (rst)
                           out_valid && !out_ready |=> out_valid && $stable(out_data));
endmodule
