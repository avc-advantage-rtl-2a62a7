// Self-checking testbench for lcd_port at the voter-LCD base 0x70.
// Records E, RS and R/W on every E pulse and checks the table of the four
// ports, that wrong-direction and foreign ports give no E pulse, and that
// reads return the controller's data.
module tb_lcd_port;
  import avc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;
  logic lcd_e, lcd_rs, lcd_rw, lcd_d_oe;
  logic [7:0] lcd_d_o, lcd_d_i = 8'h3C;
  int e_count = 0;
  logic [1:0] last_rsrw;
  logic [7:0] last_d;
  lcd_port #(.BASE(8'h70)) dut (.*);
  always @(posedge clk) if (lcd_e) begin
    e_count++; last_rsrw <= {lcd_rs, lcd_rw}; last_d <= lcd_d_oe ? lcd_d_o : 8'hZZ;
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
    out(8'h70, 8'h38);
    expect_eq("cmd rs/rw", last_rsrw, 2'b00); expect_eq("cmd data", last_d, 8'h38);
    out(8'h72, 8'h41);
    expect_eq("data rs/rw", last_rsrw, 2'b10); expect_eq("data data", last_d, 8'h41);
    expect_in(8'h71, 8'h3C);
    expect_eq("status rs/rw", last_rsrw, 2'b01);
    lcd_d_i = 8'h5E;
    expect_in(8'h73, 8'h5E);
    expect_eq("read rs/rw", last_rsrw, 2'b11);
    expect_eq("e pulses", e_count, 4);
    out(8'h71, 8'h00); out(8'h73, 8'h00);    // wrong direction
    expect_in(8'h70, 8'hFF);
    out(8'h10, 8'h00); out(8'h74, 8'h00);    // other devices
    expect_eq("no extra e", e_count, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
