// "Rev. C" Results Cartridge.
//
// 96 KB of battery-backed SRAM behind a small register file reached through
// the slot connector (register numbers are the low three bits of the I/O port,
// 0xB0-0xB5 for slot A and 0xB8-0xBD for slot B):
//   out 0  working address bits 7:0
//   out 1  working address bits 12:8 (value bits 4:0); bit 7 = address invalidator
//   out 3  working address bits 16:13 (value bits 3:0); bit 6 = LED; bit 7 = AAI enable
//   in  2  read the SRAM byte at the working address (0xFF if the address is
//          at or above 96 K or the invalidator is set)
//   out 2  write it (only in range, invalidator clear and armed)
//   in  4  ID byte, 0x12
//   out 5  arming bit := (value[7:4] == ID[7:4])
// With AAI enabled, every read or write command then increments the low eight
// address bits modulo 256.  All state clears when the cartridge is removed
// (present low) or the machine is reset.  This behaviour follows the board
// description; using value bits 4:0 for address bits 12:8, the connector
// bundle, and 0xFF for reads of other registers are this model's choices.
// Read data is on c_rdata one cycle after the strobe.
module results_cartridge
  import avc_pkg::*;
#(
  parameter int unsigned SRAM_BYTES = 98304,
  parameter logic [7:0]  CART_ID    = 8'h12
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      present,
  input  cart_bus_t c,
  output logic [7:0] c_rdata,
  output logic      led
);
  logic [16:0] waddr_q;
  logic        inval_q, arm_q, aai_q, led_q;
  logic        in_range, rw_cmd, ram_cs, ram_rd_q;
  logic [7:0]  ram_rdata, other_q;
  logic        active;

  assign active   = rst_n && present;
  assign in_range = 32'(waddr_q) < SRAM_BYTES;
  assign rw_cmd   = c.stb && c.reg_sel == 3'd2;
  assign ram_cs   = rw_cmd && in_range && !inval_q && (!c.wr || arm_q);

  always_ff @(posedge clk or negedge active) begin
    if (!active) begin
      waddr_q <= '0;
      inval_q <= 1'b0;
      arm_q   <= 1'b0;
      aai_q   <= 1'b0;
      led_q   <= 1'b0;
    end else if (c.stb) begin
      if (c.wr) begin
        unique case (c.reg_sel)
          3'd0: waddr_q[7:0] <= c.wdata;
          3'd1: begin
            waddr_q[12:8] <= c.wdata[4:0];
            inval_q       <= c.wdata[7];
          end
          3'd3: begin
            waddr_q[16:13] <= c.wdata[3:0];
            led_q          <= c.wdata[6];
            aai_q          <= c.wdata[7];
          end
          3'd5: arm_q <= c.wdata[7:4] == CART_ID[7:4];
          default: ;
        endcase
      end
      if (rw_cmd && aai_q) waddr_q[7:0] <= waddr_q[7:0] + 8'd1;
    end
  end

  sram #(.DEPTH(SRAM_BYTES), .AW(17)) u_ram (
    .clk, .cs(ram_cs), .we(c.wr), .addr(waddr_q), .wdata(c.wdata), .rdata(ram_rdata)
  );

  always_ff @(posedge clk or negedge active) begin
    if (!active) begin
      ram_rd_q <= 1'b0;
      other_q  <= 8'hFF;
    end else begin
      ram_rd_q <= ram_cs && !c.wr;
      other_q  <= (c.stb && !c.wr && c.reg_sel == 3'd4) ? CART_ID : 8'hFF;
    end
  end

  assign c_rdata = ram_rd_q ? ram_rdata : other_q;
  assign led     = led_q;
endmodule
