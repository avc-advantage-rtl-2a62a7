// Switch status and power control registers.
//
// IN from port 0x06 returns the service switches and supply state:
//   bit 0 Print More pressed, bit 1 Polls Open, bit 2 Polls Closed,
//   bits 3-4 always 0, bit 5 power knob On, bit 6 AC present,
//   bit 7 12 V battery missing.
// OUT to port 0x04 sets the power control register:
//   bit 0 PWRON (keep the board powered), bit 2 voter panel bus power,
//   bit 3 voter panel light power, bit 7 watchdog input (see nmi_ctrl).
// The supply keeps the board powered while PWRON is 1 or the knob is in the
// On position (psu_hold).  Bit assignments follow the board description;
// taking bit 7 (not bit 6) as the watchdog input, psu_hold as an OR, and
// clearing the register on reset are this model's choices.  Switch reads
// appear on rsp one cycle after the request.
module power_ctrl
  import avc_pkg::*;
#(
  parameter logic [7:0] PORT_STATUS = 8'h06,
  parameter logic [7:0] PORT_CTRL   = 8'h04
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp,
  input  logic     print_more,
  input  logic     polls_open,
  input  logic     polls_closed,
  input  logic     knob_on,
  input  logic     ac_on,
  input  logic     no_batt,
  output logic     pwron,
  output logic     vp_bus_pwr,
  output logic     vp_light_pwr,
  output logic     wd_in,
  output logic     psu_hold
);
  logic [7:0] ctrl_q, stat_q;
  logic       rd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q <= 8'h00;
      rd_q   <= 1'b0;
      stat_q <= 8'h00;
    end else begin
      if (io_wr(req, PORT_CTRL)) ctrl_q <= req.wdata;
      rd_q   <= io_rd(req, PORT_STATUS);
      stat_q <= {no_batt, ac_on, knob_on, 2'b00, polls_closed, polls_open, print_more};
    end
  end

  assign pwron        = ctrl_q[0];
  assign vp_bus_pwr   = ctrl_q[2];
  assign vp_light_pwr = ctrl_q[3];
  assign wd_in        = ctrl_q[7];
  assign psu_hold     = pwron || knob_on;

  assign rsp = '{hit: rd_q, data: rd_q ? stat_q : 8'h00};
endmodule
