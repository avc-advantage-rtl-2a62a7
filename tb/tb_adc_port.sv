// Self-checking testbench for adc_port together with adc0808_model and
// clk_divider at the board's divide-by-128 clock.  Converts all eight channels
// and checks the EOC sequence (high 8 ADC clocks, low 56) in system clocks,
// the result, and the ALE/START/OE strobes.
module tb_adc_port;
  import avc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [2:0] adc_add;
  logic adc_ale, adc_start, adc_oe, adc_eoc, div_out;
  logic [7:0] adc_d;
  logic [7:0][7:0] in_code;
  adc_port dut (.*);
  clk_divider u_div (.clk, .rst_n, .div_out);
  adc0808_model u_adc (.clk, .rst_n, .clock(div_out), .in_code, .add(adc_add), .ale(adc_ale),
                       .start(adc_start), .oe(adc_oe), .eoc(adc_eoc), .d(adc_d));
  int cycle = 0;
  always @(posedge clk) cycle++;
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
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    req = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int ch = 0; ch < 8; ch++) in_code[ch] = 8'(ch * 33 + 7);
    expect_in(8'h63, 8'h80);
    for (int ch = 7; ch >= 0; ch--) begin
      int t_start, t_fall, t_rise;
      logic [7:0] v;
      out(8'h60, 8'hF8 | 8'(ch));
      out(8'h61, 8'h00);
      t_start = cycle;
      do inp(8'h63, v); while (v[7]);
      t_fall = cycle;
      do inp(8'h63, v); while (!v[7]);
      t_rise = cycle;
      // 8 ADC clocks high (the first one may be partial), 56 low
      checks++;
      if (t_fall - t_start < 7 * 128 || t_fall - t_start > 8 * 128 + 4) begin
        failures++; $display("FAIL eoc high time %0d", t_fall - t_start); end
      checks++;
      if (t_rise - t_fall < 56 * 128 - 4 || t_rise - t_fall > 56 * 128 + 4) begin
        failures++; $display("FAIL eoc low time %0d", t_rise - t_fall); end
      expect_in(8'h62, 8'(ch * 33 + 7));
    end
    expect_in(8'h64, 8'hFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
