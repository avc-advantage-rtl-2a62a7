// Self-checking testbench for op_panel.
// Checks the switch ports, the LED latches, the Test LED read-back in bit 7
// of port 0x14, the speaker toggling on CTC pulses, and the LCD at 0x10-0x13.
module tb_op_panel;
  import avc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [14:0] sw = '0;
  logic [15:0] led;
  logic ctc_zcto = 0, speaker;
  logic lcd_e, lcd_rs, lcd_rw, lcd_d_oe;
  logic [7:0] lcd_d_o, lcd_d_i = 8'h80, lcd_last = 8'h00;
  op_panel dut (.*);
  always @(posedge clk) if (lcd_e && lcd_d_oe) lcd_last <= lcd_d_o;
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
    sw = 15'h2A55;
    expect_in(8'h14, 8'h55);
    expect_in(8'h15, 8'h54);
    out(8'h16, 8'hC3);
    out(8'h17, 8'h81);
    expect_eq("leds", led, 16'h81C3);
    expect_in(8'h14, 8'hD5);          // Test LED reads back
    out(8'h17, 8'h01);
    expect_in(8'h14, 8'h55);
    expect_eq("speaker 0", speaker, 0);
    for (int i = 1; i <= 5; i++) begin
      ctc_zcto = 1; repeat (2) @(posedge clk); #1 ctc_zcto = 0; repeat (3) @(posedge clk); #1;
      expect_eq("speaker toggles", speaker, i % 2);
    end
    expect_in(8'h11, 8'h80);          // LCD busy flag
    out(8'h10, 8'h01);
    expect_eq("lcd cmd", lcd_last, 8'h01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
