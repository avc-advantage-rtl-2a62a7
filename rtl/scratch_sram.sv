// 8 KB scratch SRAM reached only through I/O ports.
//
// An OUT to port 0x95 sets the 256-byte page: value bits 2:0 become SRAM
// address bits 10:8, bit 7 becomes bit 11 and bit 6 becomes bit 12 (bits 5:3
// are ignored).  IN and OUT on port 0x96 then read and write the byte whose
// low address bits 7:0 come from the upper address byte (A15:A8) of the I/O
// cycle.  The port numbers and the bit mapping follow the board description;
// resetting the page register to 0 is this model's choice.  The RAM is not
// battery backed.  Read data is on rsp one cycle after the request.
module scratch_sram
  import avc_pkg::*;
#(
  parameter logic [7:0] PORT_PAGE = 8'h95,
  parameter logic [7:0] PORT_DATA = 8'h96
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp
);
  logic [4:0]  page_q;   // SRAM address bits 12:8
  logic        acc, rd_q;
  logic [12:0] addr;
  logic [7:0]  rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     page_q <= '0;
    else if (io_wr(req, PORT_PAGE)) page_q <= {req.wdata[6], req.wdata[7], req.wdata[2:0]};
  end

  assign acc  = io_wr(req, PORT_DATA) || io_rd(req, PORT_DATA);
  assign addr = {page_q, req.addr[15:8]};

  sram #(.DEPTH(8192)) u_ram (
    .clk, .cs(acc), .we(req.wr), .addr, .wdata(req.wdata), .rdata
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_q <= 1'b0;
    else        rd_q <= io_rd(req, PORT_DATA);
  end

  assign rsp = '{hit: rd_q, data: rd_q ? rdata : 8'h00};
endmodule
