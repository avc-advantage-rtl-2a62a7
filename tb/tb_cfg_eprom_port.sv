// Self-checking testbench for cfg_eprom_port.
// A behavioural 8 KB EPROM returns addr*7+3 (low byte, plus bit 7 of the
// upper address bits) so any address bit routed wrongly shows.  Checks that
// all of 0x30-0x3F read it with A15:A8 as the address and that other ports
// and writes leave the EPROM alone.
module tb_cfg_eprom_port;
  import avc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [12:0] cfg_addr;
  logic cfg_oe;
  logic [7:0] cfg_data;
  int oe_count = 0;
  cfg_eprom_port dut (.*);
  function automatic logic [7:0] rom(logic [12:0] a);
    return 8'(a * 7 + 3) ^ {3'b0, a[12:8]};
  endfunction
  assign cfg_data = rom(cfg_addr);
  always @(posedge clk) if (cfg_oe) oe_count++;
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
    for (int i = 0; i < 256; i += 37) expect_in(8'h30 | 8'(i % 16), rom(13'(i)), 8'(i));
    expect_in(8'h3F, rom(13'hFF), 8'hFF);
    expect_in(8'h3A, rom(13'h00), 8'h00);
    expect_in(8'h40, 8'hFF, 8'h12);   // not this block
    expect_in(8'h20, 8'hFF, 8'h12);
    out(8'h30, 8'h55, 8'h01);
    expect_eq("oe count", oe_count, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
