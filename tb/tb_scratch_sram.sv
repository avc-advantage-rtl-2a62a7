// Self-checking testbench for scratch_sram.
// Fills every 256-byte page through the page register (with the odd bit
// mapping 0-2 -> A8-A10, 7 -> A11, 6 -> A12 and junk in bits 5:3) and reads
// it back against a reference array indexed by the same address.
module tb_scratch_sram;
  import avc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;
  scratch_sram dut (.*);
  logic [7:0] ref_mem [8192];
  function automatic logic [7:0] page_val(int p);
    // SRAM address bits 12:8 = p; value bits: 6 -> A12, 7 -> A11, 2:0 -> A10:A8
    return {1'(p >> 3), 1'(p >> 4), 3'b101, 3'(p)};
  endfunction
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
    for (int p = 0; p < 32; p++) begin
      out(8'h95, page_val(p));
      for (int o = 0; o < 256; o += 51) begin
        ref_mem[p*256+o] = 8'(p * 13 + o);
        out(8'h96, 8'(p * 13 + o), 8'(o));
      end
    end
    for (int p = 31; p >= 0; p--) begin
      out(8'h95, page_val(p));
      for (int o = 0; o < 256; o += 51) expect_in(8'h96, ref_mem[p*256+o], 8'(o));
    end
    // physical placement: page p, offset o is SRAM address p*256+o
    for (int p = 0; p < 32; p += 5) begin
      checks++;
      if (dut.u_ram.mem[p*256+102] !== ref_mem[p*256+102]) begin
        failures++; $display("FAIL placement of page %0d", p); end
    end
    // port 0x97 is not this block
    expect_in(8'h97, 8'hFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
