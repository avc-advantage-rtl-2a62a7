// Operator panel: LCD, 14 push switches, 16 LEDs and the speaker.
//
// The LCD controller is reached through an lcd_port at 0x10-0x13.  IN from
// ports 0x14 and 0x15 returns the switch states (1 = pressed).  OUT to ports
// 0x16 and 0x17 latches the LED states (1 = lit).  Bit 7 of port 0x17 drives
// the Test LED and is also read back as bit 7 of port 0x14, so software can
// check that LED.  The speaker line toggles on every ZC/TO pulse from CTC1
// channel 1, which makes a square wave.  All of this follows the board
// description.  Which switch or LED sits on which bit is not reproduced here:
// the switch bits are taken raw (sw[6:0] -> port 0x14 bits 6:0, sw[14:7] ->
// port 0x15) and led[15:0] is {port 0x17, port 0x16}.  Latches and speaker
// clear on reset (a choice).  Reads appear on rsp one cycle after the request.
module op_panel
  import avc_pkg::*;
#(
  parameter logic [7:0] PORT_SW0  = 8'h14,
  parameter logic [7:0] PORT_SW1  = 8'h15,
  parameter logic [7:0] PORT_LED0 = 8'h16,
  parameter logic [7:0] PORT_LED1 = 8'h17
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    req,
  output bus_rsp_t    rsp,
  input  logic [14:0] sw,
  output logic [15:0] led,
  input  logic        ctc_zcto,
  output logic        speaker,
  output logic        lcd_e,
  output logic        lcd_rs,
  output logic        lcd_rw,
  output logic [7:0]  lcd_d_o,
  output logic        lcd_d_oe,
  input  logic [7:0]  lcd_d_i
);
  bus_rsp_t   lcd_rsp;
  logic       rd_q, zc_prev_q;
  logic [7:0] data_q;

  lcd_port #(.BASE(8'h10)) u_lcd (
    .clk, .rst_n, .req, .rsp(lcd_rsp),
    .lcd_e, .lcd_rs, .lcd_rw, .lcd_d_o, .lcd_d_oe, .lcd_d_i
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      led       <= '0;
      speaker   <= 1'b0;
      zc_prev_q <= 1'b0;
      rd_q      <= 1'b0;
      data_q    <= 8'h00;
    end else begin
      if (io_wr(req, PORT_LED0)) led[7:0]  <= req.wdata;
      if (io_wr(req, PORT_LED1)) led[15:8] <= req.wdata;
      zc_prev_q <= ctc_zcto;
      if (ctc_zcto && !zc_prev_q) speaker <= !speaker;
      rd_q   <= io_rd(req, PORT_SW0) || io_rd(req, PORT_SW1);
      data_q <= io_rd(req, PORT_SW0) ? {led[15], sw[6:0]} : sw[14:7];
    end
  end

  always_comb begin
    rsp = lcd_rsp;
    if (rd_q) rsp = '{hit: 1'b1, data: data_q};
  end
endmodule
