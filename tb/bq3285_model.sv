// Behavioural stand-in for the BQ3285 real-time clock, used by testbenches.
// Only the multiplexed-bus register file is modelled (128 bytes that behave
// as RAM); the clock, alarm and interrupt functions of the real chip are not.
// An address strobe latches ad_i as the register address; a data strobe
// writes ad_i (rw = 0) or drives the register onto ad_o (rw = 1).
module bq3285_model (
  input  logic       clk,
  input  logic       as,
  input  logic       ds,
  input  logic       rw,
  input  logic [7:0] ad_i,
  output logic [7:0] ad_o
);
  logic [7:0] regs [128];
  logic [6:0] addr = '0;
  int writes = 0;
  initial for (int i = 0; i < 128; i++) regs[i] = 8'h00;
  always @(posedge clk) begin
    if (as) addr <= ad_i[6:0];
    if (ds && !rw) begin regs[addr] <= ad_i; writes++; end
  end
  assign ad_o = regs[addr];
endmodule
