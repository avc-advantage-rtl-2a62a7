// Bus interface to an HD44780 character-LCD controller.
//
// Four consecutive I/O ports from BASE drive the controller's E, RS and R/W
// lines:
//   BASE+0 OUT  E=1 RS=0 R/W=0  write instruction
//   BASE+1 IN   E=1 RS=0 R/W=1  read busy flag / address
//   BASE+2 OUT  E=1 RS=1 R/W=0  write data
//   BASE+3 IN   E=1 RS=1 R/W=1  read data
// Any other cycle leaves E low.  The operator panel LCD sits at 0x10 and the
// voter LCD at 0x70, as on the board.  E is high for the single request
// cycle, and accesses in the wrong direction are ignored; both are this
// model's choices.  Read data is sampled from lcd_d_i in the request cycle
// and appears on rsp one cycle later.
module lcd_port
  import avc_pkg::*;
#(
  parameter logic [7:0] BASE = 8'h10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  bus_req_t   req,
  output bus_rsp_t   rsp,
  output logic       lcd_e,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic [7:0] lcd_d_o,
  output logic       lcd_d_oe,
  input  logic [7:0] lcd_d_i
);
  logic       mine, rd_q;
  logic [7:0] data_q;

  assign mine     = req.iorq && req.addr[7:2] == BASE[7:2];
  // Odd ports are read ports, even ports write ports.
  assign lcd_e    = mine && (req.addr[0] ? req.rd : req.wr);
  assign lcd_rs   = req.addr[1];
  assign lcd_rw   = req.addr[0];
  assign lcd_d_o  = req.wdata;
  assign lcd_d_oe = lcd_e && !req.addr[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q   <= 1'b0;
      data_q <= 8'h00;
    end else begin
      rd_q   <= lcd_e && req.addr[0];
      data_q <= lcd_d_i;
    end
  end

  assign rsp = '{hit: rd_q, data: rd_q ? data_q : 8'h00};
endmodule
