// trng_axi_regs: AXI4-Lite slave holding the TRNG's run-time parameters.
//
// Software writes two values: N, the number of Clk_B samples per count
// (ten bits), and Pack_EN (one bit), which selects packed random bytes or
// raw counter values.  These eleven bits, and their reset values being the
// build-time constants of a fixed system, follow the paper; the register
// map is this design's own:
//   0x0  N        bits 9:0, read/write
//   0x4  PACK_EN  bit 0,    read/write
// Other offsets read as zero and answer SLVERR; writes to them are ignored.
// Address bits 1:0 are ignored: the registers are 32-bit words.
//
// Timing: a write is accepted in the cycle both AW and W are valid and no
// response is pending; BVALID follows one cycle later and the register
// holds the new value from then on.  A read is accepted when no read data
// is pending; RVALID follows one cycle later.  Byte strobes are honoured
// per byte lane.  Assertions check that responses stay valid until taken.
module trng_axi_regs
  import trng_pkg::*;
#(
  parameter cnt_t N_DEFAULT       = cnt_t'(120),
  parameter bit   PACK_EN_DEFAULT = 1'b1
) (
  input  logic        clk,
  input  logic        rst,            // synchronous, active high
  // write address / data / response
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
  // read address / data
  input  logic [3:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  // parameters
  output cnt_t        n_samples,
  output logic        pack_en
);
  timeunit 1ps;
  timeprecision 1fs;

  logic wr_go, rd_go;

  assign wr_go         = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = wr_go;
  assign s_axi_wready  = wr_go;
  assign rd_go         = s_axi_arvalid && !s_axi_rvalid;
  assign s_axi_arready = rd_go;

  // Merge byte lanes of a write into a 32-bit register image.
  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] wd, logic [3:0] ws);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      r[8*b +: 8] = ws[b] ? wd[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      n_samples    <= N_DEFAULT;
      pack_en      <= PACK_EN_DEFAULT;
      s_axi_bvalid <= 1'b0;
      s_axi_bresp  <= AXI_OKAY;
    end else begin
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (wr_go) begin
        s_axi_bvalid <= 1'b1;
        s_axi_bresp  <= AXI_OKAY;
        unique case ({s_axi_awaddr[3:2], 2'b00})
          REG_N: n_samples <= cnt_t'(merge(32'(n_samples), s_axi_wdata, s_axi_wstrb));
          REG_PACK_EN: begin
            if (s_axi_wstrb[0]) pack_en <= s_axi_wdata[0];
          end
          default: s_axi_bresp <= AXI_SLVERR;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
      s_axi_rresp  <= AXI_OKAY;
    end else begin
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (rd_go) begin
        s_axi_rvalid <= 1'b1;
        unique case ({s_axi_araddr[3:2], 2'b00})
          REG_N:       begin s_axi_rdata <= 32'(n_samples); s_axi_rresp <= AXI_OKAY; end
          REG_PACK_EN: begin s_axi_rdata <= 32'(pack_en);   s_axi_rresp <= AXI_OKAY; end
          default:     begin s_axi_rdata <= '0;             s_axi_rresp <= AXI_SLVERR; end
        endcase
      end
    end
  end

  a_b_hold: assert property (@(posedge clk) disable iff (rst)
                             s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (rst)
                             s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
endmodule
