// Parallel (SPP) printer port for the internal thermal printer.
//
// OUT to port 0x90 latches the eight data pins and OUT to port 0x92 latches
// the four control pins; both hold their value until written again.  IN from
// port 0x91 returns the status pins as they are at that moment.  The ports and
// latching follow the board description.  The bit-to-pin assignment used here
// is the usual PC one and is this model's choice: control bits 3:0 =
// SELIN, INIT, AUTOFD, STROBE; status bits 7:3 = BUSY, ACK, PE, SELECT, ERROR
// (bits 2:0 read 0), all without inversion.  The ACK pin also feeds CTC1
// channel 2.  Latches clear on reset.  Reads appear on rsp one cycle later.
module printer_port
  import avc_pkg::*;
#(
  parameter logic [7:0] PORT_DATA   = 8'h90,
  parameter logic [7:0] PORT_STATUS = 8'h91,
  parameter logic [7:0] PORT_CTRL   = 8'h92
) (
  input  logic       clk,
  input  logic       rst_n,
  input  bus_req_t   req,
  output bus_rsp_t   rsp,
  output logic [7:0] pp_data,
  output logic [3:0] pp_ctrl,
  input  logic [4:0] pp_status
);
  logic       rd_q;
  logic [7:0] stat_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pp_data <= 8'h00;
      pp_ctrl <= 4'h0;
      rd_q    <= 1'b0;
      stat_q  <= 8'h00;
    end else begin
      if (io_wr(req, PORT_DATA)) pp_data <= req.wdata;
      if (io_wr(req, PORT_CTRL)) pp_ctrl <= req.wdata[3:0];
      rd_q   <= io_rd(req, PORT_STATUS);
      stat_q <= {pp_status, 3'b000};
    end
  end

  assign rsp = '{hit: rd_q, data: rd_q ? stat_q : 8'h00};
endmodule
