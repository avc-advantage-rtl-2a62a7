// Self-checking testbench for nmi_ctrl with a short watchdog (100 cycles).
// Checks the opcode-fetch NMI and its status bit, that fetches below 0x8000
// and data reads above it do not trigger, the clear port, and the watchdog:
// no NMI while the bit toggles or PWRON is 0, an NMI exactly WDT_CYCLES after
// the last change otherwise.
module tb_nmi_ctrl;
  import avc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;
  localparam int WDT = 100;
  logic wd_in = 0, pwron = 0, nmi, nmi_fetch, nmi_wdt;
  int n_nmi = 0, n_wdt = 0, n_fetch = 0;
  int last_wdt_cycle = 0, cycle = 0;
  nmi_ctrl #(.WDT_CYCLES(WDT)) dut (.*);
  always @(posedge clk) begin
    cycle++;
    if (nmi) n_nmi++;
    if (nmi_fetch) n_fetch++;
    if (nmi_wdt) begin n_wdt++; last_wdt_cycle = cycle; end
  end
  task automatic fetch(logic [15:0] a, bit m1);
    req = '0; req.mreq = 1; req.rd = 1; req.m1 = m1; req.addr = a;
    @(posedge clk); #1 req = '0;
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
    expect_in(8'h07, 8'h00);
    fetch(16'h7FFF, 1);         // program SRAM: no NMI
    fetch(16'h8000, 0);         // data read: no NMI
    expect_eq("no nmi yet", n_nmi, 0);
    expect_in(8'h07, 8'h00);
    fetch(16'h9000, 1);
    expect_eq("fetch nmi", n_fetch, 1);
    expect_in(8'h07, 8'h02);
    expect_in(8'h07, 8'h02);
    out(8'h05, 8'h00);
    expect_in(8'h07, 8'h00);
    // watchdog with PWRON = 0: never fires
    repeat (3 * WDT) @(posedge clk);
    expect_eq("no wdt with pwron 0", n_wdt, 0);
    // PWRON = 1, toggling the bit keeps it quiet
    pwron = 1;
    for (int i = 0; i < 6; i++) begin
      repeat (WDT - 10) @(posedge clk);
      #1 wd_in = !wd_in;
    end
    expect_eq("no wdt while toggling", n_wdt, 0);
    begin
      int t0;
      t0 = cycle;
      wait (n_wdt == 1);
      // one clock to see the last change, then WDT_CYCLES unchanged clocks
      expect_eq("wdt delay", last_wdt_cycle - t0, WDT + 1);
      wait (n_wdt == 2);
      expect_eq("wdt repeats", last_wdt_cycle - t0, 2 * WDT + 1);
    end
    expect_in(8'h07, 8'h00);   // watchdog NMIs do not set the status bit
    expect_eq("total nmi", n_nmi, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
