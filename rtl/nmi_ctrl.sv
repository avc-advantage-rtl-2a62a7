// Non-maskable interrupt sources.
//
// Two sources raise the Z80's NMI (modelled as a one-cycle request pulse on
// nmi; the CPU then jumps to 0x0066):
//  * Opcode fetch from data RAM: a memory cycle with M1 active and A15 = 1.
//    It also sets a status bit that an IN from port 0x07 returns in bit 1
//    (other bits 0) and that any OUT to port 0x05 clears.  Fetches from the
//    program SRAM (A15 = 0) do not count.
//  * Watchdog: when the watchdog input bit of the power register (wd_in)
//    keeps its value for WDT_CYCLES clocks (1.6 s) and PWRON is 1.
// Both rules follow the board description.  The system clock frequency is not
// given; WDT_CYCLES assumes 4 MHz.  After firing, the watchdog counts again
// from zero, so it repeats every 1.6 s while wd_in stays unchanged; that
// repetition is this model's choice.
module nmi_ctrl
  import avc_pkg::*;
#(
  parameter int unsigned WDT_CYCLES  = 6_400_000,
  parameter logic [7:0]  PORT_STATUS = 8'h07,
  parameter logic [7:0]  PORT_CLEAR  = 8'h05
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp,
  input  logic     wd_in,
  input  logic     pwron,
  output logic     nmi,
  output logic     nmi_fetch,
  output logic     nmi_wdt
);
  localparam int CW = $clog2(WDT_CYCLES + 1);

  logic          status_q, rd_q, wd_prev_q;
  logic [CW-1:0] cnt_q;
  logic          wdt_expire;

  assign nmi_fetch  = req.mreq && req.m1 && req.addr[15];
  assign wdt_expire = (wd_in == wd_prev_q) && cnt_q == CW'(WDT_CYCLES - 1);
  assign nmi_wdt    = wdt_expire && pwron;
  assign nmi        = nmi_fetch || nmi_wdt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status_q  <= 1'b0;
      rd_q      <= 1'b0;
      wd_prev_q <= 1'b0;
      cnt_q     <= '0;
    end else begin
      if (nmi_fetch)                    status_q <= 1'b1;
      else if (io_wr(req, PORT_CLEAR))  status_q <= 1'b0;
      rd_q      <= io_rd(req, PORT_STATUS);
      wd_prev_q <= wd_in;
      if (wd_in != wd_prev_q || wdt_expire) cnt_q <= '0;
      else                                  cnt_q <= cnt_q + 1'b1;
    end
  end

  // The status read returns the value before a same-cycle change.
  logic status_rd_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) status_rd_q <= 1'b0;
    else        status_rd_q <= status_q;
  end

  assign rsp = '{hit: rd_q, data: rd_q ? {6'b0, status_rd_q, 1'b0} : 8'h00};
endmodule
