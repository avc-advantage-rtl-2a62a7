// Self-checking testbench for results_cartridge, driven through cart_slots
// in slot A so that the test uses the real port numbers (0xB0-0xB5).
// Checks ID byte, arming rules, write protection when unarmed, out-of-range
// and invalidated addresses, automatic increment with wrap-around inside the
// low byte, the LED bit, the top of the 96 KB range, and that removing the
// cartridge clears its state but not its SRAM.
module tb_results_cartridge;
  import avc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [1:0] present = 2'b01;
  cart_bus_t ca, cb;
  logic [7:0] ca_rdata, cb_rdata = 8'h00;
  logic led, slot_b_present;
  cart_slots u_slots (.clk, .rst_n, .req, .rsp, .present, .ca, .cb, .ca_rdata, .cb_rdata, .slot_b_present);
  results_cartridge dut (.clk, .rst_n, .present(present[0]), .c(ca), .c_rdata(ca_rdata), .led);
  task automatic set_addr(int a, bit inval = 0, bit aai = 0, bit ledb = 0);
    out(8'hB0, 8'(a));
    out(8'hB1, {inval, 2'b00, 5'(a >> 8)});
    out(8'hB3, {aai, ledb, 2'b00, 4'(a >> 13)});
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
    expect_in(8'hB4, 8'h12);
    // unarmed: writes are ignored
    set_addr(16'h0100); out(8'hB2, 8'h11);
    set_addr(16'h0100); expect_in(8'hB2, 8'h00 ^ dut.u_ram.mem[16'h0100]);
    // arming with the wrong high nibble keeps it off
    out(8'hB5, 8'h2F);
    expect_eq("arm after 0x2F", dut.arm_q, 0);
    out(8'hB5, 8'h1C);
    expect_eq("arm after 0x1C", dut.arm_q, 1);
    set_addr(16'h0100); out(8'hB2, 8'h11);
    set_addr(16'h0100); expect_in(8'hB2, 8'h11);
    // top of the range and out of range
    set_addr(17'h17FFF); out(8'hB2, 8'hEE);
    set_addr(17'h17FFF); expect_in(8'hB2, 8'hEE);
    set_addr(17'h18000); out(8'hB2, 8'h33); expect_in(8'hB2, 8'hFF);
    set_addr(17'h1FFFF); expect_in(8'hB2, 8'hFF);
    // invalidator blocks reads and writes
    set_addr(16'h0100, 1); out(8'hB2, 8'h99); expect_in(8'hB2, 8'hFF);
    set_addr(16'h0100); expect_in(8'hB2, 8'h11);
    // AAI: sequential write then read, wrapping in the low byte only
    set_addr(17'h0A5FE, 0, 1);
    for (int i = 0; i < 4; i++) out(8'hB2, 8'(8'h40 + i));
    expect_eq("addr after 4 writes", dut.waddr_q, 17'h0A502);
    set_addr(17'h0A5FE, 0, 1);
    for (int i = 0; i < 4; i++) expect_in(8'hB2, 8'(8'h40 + i));
    set_addr(17'h0A600);
    expect_in(8'hB2, dut.u_ram.mem[17'h0A600]);
    expect_eq("no carry into bit 8", dut.u_ram.mem[17'h0A500], 8'h42);
    // LED bit
    set_addr(0, 0, 0, 1);
    expect_eq("led on", led, 1);
    // removal clears the state, keeps the SRAM
    set_addr(16'h0100, 0, 1, 1);
    present = 2'b00; @(posedge clk); #1;
    expect_eq("led after removal", led, 0);
    expect_in(8'hB4, 8'hFF);                // empty slot
    present = 2'b01; @(posedge clk); #1;
    expect_eq("addr after removal", dut.waddr_q, 0);
    expect_eq("arm after removal", dut.arm_q, 0);
    set_addr(16'h0100); expect_in(8'hB2, 8'h11);
    out(8'hB2, 8'h77);                      // unarmed again
    set_addr(16'h0100); expect_in(8'hB2, 8'h11);
    // other registers read 0xFF
    expect_in(8'hB0, 8'hFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
