// Self-checking testbench for cart_slots with two behavioural cartridges
// that answer with their slot tag and register number.  Checks port-to-slot
// steering, register numbers, empty-slot reads and the slot B presence output.
module tb_cart_slots;
  import avc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [1:0] present = 2'b11;
  cart_bus_t ca, cb;
  logic [7:0] ca_rdata, cb_rdata;
  logic slot_b_present;
  cart_slots dut (.*);
  logic [7:0] last_a, last_b;
  int stb_a = 0, stb_b = 0;
  always @(posedge clk) begin
    ca_rdata <= 8'hA0 | 8'(ca.reg_sel);
    cb_rdata <= 8'hB0 | 8'(cb.reg_sel);
    if (ca.stb) begin stb_a++; if (ca.wr) last_a <= ca.wdata; end
    if (cb.stb) begin stb_b++; if (cb.wr) last_b <= cb.wdata; end
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
    for (int r = 0; r < 6; r++) begin
      expect_in(8'hB0 | 8'(r), 8'hA0 | 8'(r));
      expect_in(8'hB8 | 8'(r), 8'hB0 | 8'(r));
    end
    out(8'hB2, 8'h5A); out(8'hBA, 8'hC3);
    @(posedge clk); #1;
    expect_eq("slot a data", last_a, 8'h5A);
    expect_eq("slot b data", last_b, 8'hC3);
    expect_eq("strobes a", stb_a, 7);
    expect_eq("strobes b", stb_b, 7);
    expect_eq("slot b present", slot_b_present, 1);
    present = 2'b01;
    expect_in(8'hBC, 8'hFF);
    expect_eq("slot b absent", slot_b_present, 0);
    expect_eq("no strobe to empty slot", stb_b, 7);
    expect_in(8'hB4, 8'hA4);
    expect_in(8'hC4, 8'hFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
