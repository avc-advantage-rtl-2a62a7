// Self-checking testbench for rtc_port with a RAM-only BQ3285 model.
// Checks that a write or read only reaches the chip right after an address
// set, that the address must be set again for every access, that reads
// without it return 0xFF, and that reset forgets the address.
module tb_rtc_port;
  import avc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;
  logic rtc_as, rtc_ds, rtc_rw;
  logic [7:0] rtc_ad_o, rtc_ad_i;
  rtc_port dut (.*);
  bq3285_model u_rtc (.clk, .as(rtc_as), .ds(rtc_ds), .rw(rtc_rw), .ad_i(rtc_ad_o), .ad_o(rtc_ad_i));
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
    out(8'h50, 8'h20); out(8'h52, 8'h5A);
    out(8'h50, 8'h21); out(8'h52, 8'hA5);
    out(8'h50, 8'h20); expect_in(8'h53, 8'h5A);
    expect_in(8'h53, 8'hFF);                 // address used up
    out(8'h52, 8'h00);                       // dropped
    out(8'h50, 8'h21); expect_in(8'h53, 8'hA5);
    out(8'h50, 8'h20); expect_in(8'h53, 8'h5A);   // the dropped write did nothing
    out(8'h50, 8'h21);
    rst_n = 0; #1 rst_n = 1;
    expect_in(8'h53, 8'hFF);                 // reset forgot the address
    out(8'h52, 8'h77);
    out(8'h50, 8'h21); expect_in(8'h53, 8'hA5);
    expect_eq("writes seen by chip", u_rtc.writes, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
