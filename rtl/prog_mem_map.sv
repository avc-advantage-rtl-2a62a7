// Program memory subsystem: the low 32 KB of the Z80 address space.
//
// 0x0000-0x3FFF always reads the first 16 KB of EPROM 1.  0x4000-0x7FFF is a
// window whose target is set by the byte last written to I/O port 0x01 (the
// "map" byte):
//   map[7:4] one-hot chip: 0001 EPROM 1, 0010 EPROM 2, 0100 EPROM 3,
//            1000 program SRAM, 0000 unmapped (reads 0xFF, writes ignored);
//   map[1:0] EPROM region: 11 -> 0x0000, 10 -> 0x4000, 01 -> 0x8000,
//            00 -> 0xC000 (the region base bits A15:A14 are ~map[1:0]);
//   map[0]   SRAM region: 1 -> 0x0000, 0 -> 0x4000.
// The map byte is cleared by reset, so the window starts unmapped.  These
// codes and the fixed lower window follow the board description.  Map bytes
// with several chip bits set select all those chips at once; this model then
// returns the AND of their outputs (bus fight), which is its own choice.
//
// The three 64 KB EPROMs are outside this block: it drives their chip selects
// and a shared 16-bit address and samples their data in the request cycle.
// The optional 32 KB program SRAM is inside (PROG_SRAM_FITTED).  Read data
// appears on rsp one cycle after the request (see avc_pkg).
module prog_mem_map
  import avc_pkg::*;
#(
  parameter bit         PROG_SRAM_FITTED = 1'b1,
  parameter logic [7:0] PORT_PMAP        = 8'h01
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  bus_req_t             req,
  output bus_rsp_t             rsp,
  output logic [2:0]           eprom_cs,
  output logic [15:0]          eprom_addr,
  input  logic [2:0][7:0]      eprom_data
);
  logic [7:0]  map_q;
  logic        mem_lo, upper;
  logic        sram_cs;
  logic [14:0] sram_addr;
  logic [7:0]  sram_rdata;
  logic [7:0]  eprom_and;
  logic        rd_q, sram_rd_q;
  logic [7:0]  eprom_q;

  assign mem_lo = req.mreq && !req.addr[15] && (req.rd || req.wr);
  assign upper  = req.addr[14];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  map_q <= 8'h00;
    else if (io_wr(req, PORT_PMAP)) map_q <= req.wdata;
  end

  always_comb begin
    eprom_cs   = '0;
    eprom_addr = {2'b00, req.addr[13:0]};
    sram_cs    = 1'b0;
    sram_addr  = {~map_q[0], req.addr[13:0]};
    if (mem_lo) begin
      if (!upper) begin
        eprom_cs[0] = req.rd;
      end else begin
        eprom_cs   = map_q[6:4] & {3{req.rd}};
        eprom_addr = {~map_q[1:0], req.addr[13:0]};
        sram_cs    = map_q[7] && PROG_SRAM_FITTED;
      end
    end
  end

  // Wired-AND of all selected EPROM outputs; 0xFF when none is selected.
  always_comb begin
    eprom_and = 8'hFF;
    for (int i = 0; i < 3; i++)
      if (eprom_cs[i]) eprom_and &= eprom_data[i];
  end

  if (PROG_SRAM_FITTED) begin : g_sram
    sram #(.DEPTH(32768)) u_sram (
      .clk, .cs(sram_cs), .we(req.wr), .addr(sram_addr),
      .wdata(req.wdata), .rdata(sram_rdata)
    );
  end else begin : g_nosram
    assign sram_rdata = 8'hFF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q      <= 1'b0;
      sram_rd_q <= 1'b0;
      eprom_q   <= 8'hFF;
    end else begin
      rd_q      <= mem_lo && req.rd;
      sram_rd_q <= sram_cs && req.rd;
      eprom_q   <= eprom_and;
    end
  end

  assign rsp.hit  = rd_q;
  assign rsp.data = rd_q ? (sram_rd_q ? (eprom_q & sram_rdata) : eprom_q) : 8'h00;
endmodule
