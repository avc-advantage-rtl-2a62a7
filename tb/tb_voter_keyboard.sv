// Self-checking testbench for voter_keyboard.
// Presses every key position in every bank and checks which bits read back,
// including the always-zero unlabeled positions and an unselected bank.
module tb_voter_keyboard;
  import avc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [4:0][7:0] keys = '0;
  voter_keyboard dut (.*);
  localparam logic [4:0][7:0] MASK = {8'h7F, 8'hFF, 8'h1F, 8'hFF, 8'h7F};
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
    expect_in(8'h75, 8'h00);
    for (int b = 0; b < 5; b++) begin
      out(8'h74, 8'(1 << b));
      for (int k = 0; k < 8; k++) begin
        keys = '0; keys[b][k] = 1'b1;
        keys[(b + 1) % 5] = 8'hFF;       // another bank busy, not selected
        expect_in(8'h75, MASK[b][k] ? 8'(1 << k) : 8'h00);
      end
    end
    keys = '1;
    out(8'h74, 8'h03);
    expect_in(8'h75, 8'hFF);
    out(8'h74, 8'h04);
    expect_in(8'h75, 8'h1F);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
