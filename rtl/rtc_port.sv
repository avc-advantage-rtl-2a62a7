// Access logic for the BQ3285 real-time clock.
//
// The clock chip has a multiplexed address/data bus.  An OUT to port 0x50
// strobes the written byte into the chip as the register address (rtc_as) and
// arms a one-shot "address valid" flag.  An OUT to port 0x52 then writes a
// byte to that register (rtc_ds with rtc_rw = 0) and an IN from port 0x53
// reads it (rtc_ds with rtc_rw = 1); either access uses up the flag.  Without
// a preceding address write, reads return 0xFF and writes do nothing; reset
// also clears the flag.  These rules follow the board description.  Strobes
// last one system clock, which is this model's choice; the read value is
// sampled from rtc_ad_i in the request cycle and appears on rsp one cycle
// later.
module rtc_port
  import avc_pkg::*;
#(
  parameter logic [7:0] PORT_ADDR = 8'h50,
  parameter logic [7:0] PORT_WR   = 8'h52,
  parameter logic [7:0] PORT_RD   = 8'h53
) (
  input  logic       clk,
  input  logic       rst_n,
  input  bus_req_t   req,
  output bus_rsp_t   rsp,
  output logic       rtc_as,
  output logic       rtc_ds,
  output logic       rtc_rw,
  output logic [7:0] rtc_ad_o,
  input  logic [7:0] rtc_ad_i
);
  logic       valid_q, rd_q;
  logic [7:0] data_q;
  logic       set_a, wr_a, rd_a;

  assign set_a = io_wr(req, PORT_ADDR);
  assign wr_a  = io_wr(req, PORT_WR);
  assign rd_a  = io_rd(req, PORT_RD);

  assign rtc_as   = set_a;
  assign rtc_ds   = valid_q && (wr_a || rd_a);
  assign rtc_rw   = rd_a;
  assign rtc_ad_o = req.wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      rd_q    <= 1'b0;
      data_q  <= 8'h00;
    end else begin
      if (set_a)             valid_q <= 1'b1;
      else if (wr_a || rd_a) valid_q <= 1'b0;
      rd_q   <= rd_a;
      data_q <= (valid_q && rd_a) ? rtc_ad_i : 8'hFF;
    end
  end

  assign rsp = '{hit: rd_q, data: rd_q ? data_q : 8'h00};
endmodule
