// Voltage-monitor interface to the ADC0808 converter.
//
//   OUT 0x60  pulse ALE and present value bits 2:0 as the channel address
//   OUT 0x61  pulse START (the value is ignored)
//   IN  0x63  bit 7 = EOC, bits 6:0 = 0
//   IN  0x62  raise OE and read the conversion result
// The ports and bit positions follow the board description: the ADC's address
// pins take data bits 2:0 straight from the bus, and the chip latches them on
// ALE.  Pulses lasting one system clock are this model's choice.  Reads appear on rsp one cycle later.
module adc_port
  import avc_pkg::*;
#(
  parameter logic [7:0] PORT_ADDR   = 8'h60,
  parameter logic [7:0] PORT_START  = 8'h61,
  parameter logic [7:0] PORT_RESULT = 8'h62,
  parameter logic [7:0] PORT_EOC    = 8'h63
) (
  input  logic       clk,
  input  logic       rst_n,
  input  bus_req_t   req,
  output bus_rsp_t   rsp,
  output logic [2:0] adc_add,
  output logic       adc_ale,
  output logic       adc_start,
  output logic       adc_oe,
  input  logic       adc_eoc,
  input  logic [7:0] adc_d
);
  logic       rd_q;
  logic [7:0] data_q;

  assign adc_add   = req.wdata[2:0];
  assign adc_ale   = io_wr(req, PORT_ADDR);
  assign adc_start = io_wr(req, PORT_START);
  assign adc_oe    = io_rd(req, PORT_RESULT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q    <= 1'b0;
      data_q  <= 8'h00;
    end else begin
      rd_q   <= adc_oe || io_rd(req, PORT_EOC);
      data_q <= adc_oe ? adc_d : {adc_eoc, 7'b0};
    end
  end

  assign rsp = '{hit: rd_q, data: rd_q ? data_q : 8'h00};
endmodule
