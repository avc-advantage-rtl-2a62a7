// Self-checking testbench for printer_port.
// Checks that data and control latches hold their values, and that the
// status port returns the live pin values in bits 7:3.
module tb_printer_port;
  import avc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [7:0] pp_data;
  logic [3:0] pp_ctrl;
  logic [4:0] pp_status = 5'b0;
  printer_port dut (.*);
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
    out(8'h90, 8'hA5);
    out(8'h92, 8'h0B);
    expect_eq("data", pp_data, 8'hA5);
    expect_eq("ctrl", pp_ctrl, 4'hB);
    out(8'h91, 8'h00);
    out(8'h93, 8'h00);
    expect_eq("data held", pp_data, 8'hA5);
    expect_eq("ctrl held", pp_ctrl, 4'hB);
    for (int s = 0; s < 32; s += 7) begin
      pp_status = 5'(s);
      expect_in(8'h91, {5'(s), 3'b000});
    end
    expect_in(8'h90, 8'hFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
