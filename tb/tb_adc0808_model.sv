// Self-checking testbench for adc0808_model with a fast ADC clock
// (one rising edge every 4 system clocks).  Checks EOC timing in ADC clocks,
// address latching by ALE, sampling at START and the OE-gated output.
module tb_adc0808_model;
  import avc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;
  logic clock = 0, ale = 0, start = 0, oe = 0, eoc;
  logic [2:0] add = 0;
  logic [7:0][7:0] in_code;
  logic [7:0] d;
  int ticks = 0;
  adc0808_model dut (.clk, .rst_n, .clock, .in_code, .add, .ale, .start, .oe, .eoc, .d);
  always @(posedge clk) begin
    ticks++;
    if (ticks % 2 == 0) clock <= !clock;
  end
  task automatic adc_clocks_until(logic level, output int n);
    n = 0;
    while (eoc !== level) begin @(posedge clock); n++; @(posedge clk); #1; end
  endtask
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
    for (int ch = 0; ch < 8; ch++) in_code[ch] = 8'(8'hA0 + ch);
    expect_eq("eoc after reset", eoc, 1);
    expect_eq("d without oe", d, 0);
    @(posedge clock); #1;
    add = 3; ale = 1; @(posedge clk); #1 ale = 0; add = 6;
    start = 1; @(posedge clk); #1 start = 0;
    in_code[3] = 8'h11;                   // change after sampling
    begin
      int h, l;
      adc_clocks_until(1'b0, h);
      adc_clocks_until(1'b1, l);
      expect_eq("eoc high adc clocks", h, 8);
      expect_eq("eoc low adc clocks", l, 56);
    end
    @(posedge clk); #1 oe = 1; #1;
    expect_eq("result", d, 8'hA3);
    oe = 0; #1;
    expect_eq("d released", d, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
