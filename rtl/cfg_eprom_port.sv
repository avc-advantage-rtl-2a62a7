// Configuration EPROM port.
//
// The 8 KB configuration EPROM (serial number, vote-authentication key) is
// read with an IN from any port 0x30-0x3F.  The upper address byte of the I/O
// cycle (A15:A8) becomes EPROM address bits 7:0 and the remaining EPROM address
// bits are held at 0, so only the first 256 bytes are reachable.  Both rules
// follow the board description.  The EPROM is a separate, per-machine
// programmed part: this block drives its address and output enable during the
// request cycle, samples its data then, and returns it on rsp one cycle later.
// Writes to these ports do nothing.
module cfg_eprom_port
  import avc_pkg::*;
#(
  parameter logic [3:0] PORT_HI = 4'h3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    req,
  output bus_rsp_t    rsp,
  output logic [12:0] cfg_addr,
  output logic        cfg_oe,
  input  logic [7:0]  cfg_data
);
  logic       rd_q;
  logic [7:0] data_q;

  assign cfg_oe   = req.iorq && req.rd && req.addr[7:4] == PORT_HI;
  assign cfg_addr = {5'b0, req.addr[15:8]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q   <= 1'b0;
      data_q <= 8'h00;
    end else begin
      rd_q   <= cfg_oe;
      data_q <= cfg_oe ? cfg_data : 8'h00;
    end
  end

  assign rsp = '{hit: rd_q, data: data_q};
endmodule
