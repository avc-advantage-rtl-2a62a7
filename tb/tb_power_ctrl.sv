// Self-checking testbench for power_ctrl.
// Walks each switch input through the status port and each control bit
// through the power register outputs, and checks the supply hold logic.
module tb_power_ctrl;
  import avc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;
  logic print_more = 0, polls_open = 0, polls_closed = 0, knob_on = 0, ac_on = 0, no_batt = 0;
  logic pwron, vp_bus_pwr, vp_light_pwr, wd_in, psu_hold;
  power_ctrl dut (.*);
  always #5 clk = ~clk;

  // One-cycle I/O write; hi is the upper address byte of the cycle.
  task automatic out(logic [7:0] port, logic [7:0] v, logic [7:0] hi = 8'h00);
    req = '0; req.iorq = 1; req.wr = 1; req.addr = {hi, port}; req.wdata = v;
    @(posedge clk); #1 req = '0;
  endtask
  // One-cycle I/O read; the answer is taken in the following cycle.
  task automatic inp(logic [7:0] port, output logic [7:0] v, input logic [7:0] hi = 8'h00);
    req = '0; req.iorq = 1; req.rd = 1; req.addr = {hi, port};
    @(posedge clk); #1 req = '0;
    v = rsp.hit ? rsp.data : 8'hFF;
  endtask
  task automatic expect_in(logic [7:0] port, logic [7:0] exp, logic [7:0] hi = 8'h00);
    logic [7:0] v;
    inp(port, v, hi);
    checks++;
    if (v !== exp) begin failures++; $display("FAIL in %h (hi %h): got %h exp %h", port, hi, v, exp); end
  endtask
  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    req = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    expect_in(8'h06, 8'h00);
    print_more = 1;   expect_in(8'h06, 8'h01);
    polls_open = 1;   expect_in(8'h06, 8'h03);
    polls_closed = 1; expect_in(8'h06, 8'h07);
    knob_on = 1;      expect_in(8'h06, 8'h27);
    ac_on = 1;        expect_in(8'h06, 8'h67);
    no_batt = 1;      expect_in(8'h06, 8'hE7);
    print_more = 0; polls_open = 0;
    expect_in(8'h06, 8'hE4);
    expect_eq("hold by knob", psu_hold, 1);
    out(8'h04, 8'h01);
    knob_on = 0; #1;
    expect_eq("hold by pwron", psu_hold, 1);
    expect_eq("outs 01", {wd_in, vp_light_pwr, vp_bus_pwr, pwron}, 4'b0001);
    out(8'h04, 8'h8C);
    expect_eq("outs 8C", {wd_in, vp_light_pwr, vp_bus_pwr, pwron}, 4'b1110);
    expect_eq("supply off", psu_hold, 0);
    out(8'h04, 8'h72);
    expect_eq("outs 72", {wd_in, vp_light_pwr, vp_bus_pwr, pwron}, 4'b0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
