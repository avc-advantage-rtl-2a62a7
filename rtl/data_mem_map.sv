// Primary data memory subsystem: the high 32 KB of the Z80 address space.
//
// 0x8000-0xFBFF maps straight onto the 32 KB battery-backed SRAM (offset
// A14:A0).  The top 1 KB, 0xFC00-0xFFFF, is a window set by the byte last
// written to I/O port 0x02: bit 7 = 1 selects 128 KB SRAM 1, bit 7 = 0 selects
// 128 KB SRAM 2, and bits 6:0 pick the 1 KB page (chip address
// {page, A9:A0}).  With only one 128 KB SRAM fitted (TWO_BIG_SRAMS = 0, the
// board's usual jumper setting) bit 7 = 0 instead maps the window onto the top
// 1 KB of the 32 KB SRAM and the page bits are ignored.  Reset clears the map
// byte, which gives the documented start-up window in both configurations.
// A power-fail input from the supply monitor deselects every SRAM; reads then
// return 0xFF, an assumption of this model.  All of the mapping follows the
// board description.
//
// Timing: writes happen at the end of the request cycle; read data is on rsp
// in the next cycle.
module data_mem_map
  import avc_pkg::*;
#(
  parameter bit         TWO_BIG_SRAMS = 1'b0,
  parameter logic [7:0] PORT_DMAP     = 8'h02
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp,
  input  logic     power_fail
);
  logic [7:0]  map_q;
  logic        mem_hi, window;
  logic        cs32, cs1, cs2;
  logic [16:0] big_addr;
  logic [7:0]  rd32, rd1, rd2;
  logic        rd_q;
  logic [2:0]  sel_q;

  assign mem_hi   = req.mreq && req.addr[15] && (req.rd || req.wr);
  assign window   = req.addr[14:10] == 5'b11111;
  assign big_addr = {map_q[6:0], req.addr[9:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     map_q <= 8'h00;
    else if (io_wr(req, PORT_DMAP)) map_q <= req.wdata;
  end

  always_comb begin
    cs32 = 1'b0;
    cs1  = 1'b0;
    cs2  = 1'b0;
    if (mem_hi && !power_fail) begin
      if (!window)          cs32 = 1'b1;
      else if (map_q[7])    cs1  = 1'b1;
      else if (TWO_BIG_SRAMS) cs2 = 1'b1;
      else                  cs32 = 1'b1;
    end
  end

  sram #(.DEPTH(32768)) u_sram32 (
    .clk, .cs(cs32), .we(req.wr), .addr(req.addr[14:0]), .wdata(req.wdata), .rdata(rd32)
  );
  sram #(.DEPTH(131072)) u_sram128_1 (
    .clk, .cs(cs1), .we(req.wr), .addr(big_addr), .wdata(req.wdata), .rdata(rd1)
  );
  if (TWO_BIG_SRAMS) begin : g_sram2
    sram #(.DEPTH(131072)) u_sram128_2 (
      .clk, .cs(cs2), .we(req.wr), .addr(big_addr), .wdata(req.wdata), .rdata(rd2)
    );
  end else begin : g_nosram2
    assign rd2 = 8'hFF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= 1'b0;
      sel_q <= '0;
    end else begin
      rd_q  <= mem_hi && req.rd;
      sel_q <= {cs2, cs1, cs32} & {3{req.rd}};
    end
  end

  always_comb begin
    rsp.hit  = rd_q;
    rsp.data = 8'h00;
    if (rd_q) begin
      unique case (sel_q)
        3'b001:  rsp.data = rd32;
        3'b010:  rsp.data = rd1;
        3'b100:  rsp.data = rd2;
        default: rsp.data = 8'hFF;
      endcase
    end
  end
endmodule
