// Motherboard side of the two memory-cartridge slots.
//
// I/O cycles to ports 0xB0-0xB7 go to slot A and 0xB8-0xBF to slot B; the
// low three port bits become the cartridge register number.  Each slot gets a
// one-cycle connector strobe carrying direction, register and data, and its
// answer is returned on rsp one cycle later.  An empty slot reads 0xFF.  The
// port families follow the board description; the connector bundle and the
// empty-slot value are this model's choices.  The slot B presence signal is
// also brought out for CTC0 channel 3.
module cart_slots
  import avc_pkg::*;
#(
  parameter logic [3:0] PORT_HI = 4'hB
) (
  input  logic       clk,
  input  logic       rst_n,
  input  bus_req_t   req,
  output bus_rsp_t   rsp,
  input  logic [1:0] present,
  output cart_bus_t  ca,
  output cart_bus_t  cb,
  input  logic [7:0] ca_rdata,
  input  logic [7:0] cb_rdata,
  output logic       slot_b_present
);
  logic       io_hit;
  logic       rd_q, slot_q, pres_q;

  assign io_hit = req.iorq && (req.rd || req.wr) && req.addr[7:4] == PORT_HI;

  always_comb begin
    ca = '{stb: io_hit && !req.addr[3] && present[0], wr: req.wr,
           reg_sel: req.addr[2:0], wdata: req.wdata};
    cb = '{stb: io_hit &&  req.addr[3] && present[1], wr: req.wr,
           reg_sel: req.addr[2:0], wdata: req.wdata};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q   <= 1'b0;
      slot_q <= 1'b0;
      pres_q <= 1'b0;
    end else begin
      rd_q   <= io_hit && req.rd;
      slot_q <= req.addr[3];
      pres_q <= present[req.addr[3]];
    end
  end

  always_comb begin
    rsp.hit  = rd_q;
    rsp.data = 8'h00;
    if (rd_q) rsp.data = !pres_q ? 8'hFF : (slot_q ? cb_rdata : ca_rdata);
  end

  assign slot_b_present = present[1];
endmodule
