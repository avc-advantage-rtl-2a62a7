// Self-checking testbench for clk_divider: the output must invert every
// 64 system clocks, so its period is 128 clocks.
module tb_clk_divider;
  import avc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;
  logic div_out;
  int edges = 0, last = 0, cycle = 0;
  clk_divider dut (.clk, .rst_n, .div_out);
  logic prev = 0;
  always @(posedge clk) begin
    cycle++;
    if (div_out !== prev) begin
      if (edges > 0) begin
        checks++;
        if (cycle - last != 64) begin failures++; $display("FAIL half period %0d", cycle - last); end
      end
      edges++; last = cycle;
    end
    prev = div_out;
  end
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
    repeat (64 * 10 + 5) @(posedge clk);
    expect_eq("edges", edges >= 9, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
