// Self-checking testbench for data_mem_map, run in both configurations
// (one and two 128 KB SRAMs).  Checks the flat 31 KB region, the start-up
// window, paging into SRAM 1 and SRAM 2, aliasing rules and power-fail
// deselection.
module tb_data_mem_map;
  import avc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req1, req2;
  bus_rsp_t rsp1, rsp2;
  logic power_fail = 1'b0;
  int checks = 0, failures = 0;

  data_mem_map #(.TWO_BIG_SRAMS(1'b0)) dut1 (.clk, .rst_n, .req(req1), .rsp(rsp1), .power_fail);
  data_mem_map #(.TWO_BIG_SRAMS(1'b1)) dut2 (.clk, .rst_n, .req(req2), .rsp(rsp2), .power_fail);

  always #5 clk = ~clk;

  bus_req_t q;
  assign req1 = q;
  assign req2 = q;

  task automatic out(logic [7:0] v);
    q = '0; q.iorq = 1; q.wr = 1; q.addr = 16'h0002; q.wdata = v;
    @(posedge clk); #1 q = '0;
  endtask
  task automatic mwr(logic [15:0] a, logic [7:0] v);
    q = '0; q.mreq = 1; q.wr = 1; q.addr = a; q.wdata = v;
    @(posedge clk); #1 q = '0;
  endtask
  task automatic chk(logic [15:0] a, logic [7:0] e1, logic [7:0] e2);
    q = '0; q.mreq = 1; q.rd = 1; q.addr = a;
    @(posedge clk); #1 q = '0;
    checks += 2;
    if (!rsp1.hit || rsp1.data !== e1) begin failures++; $display("FAIL one  %h got %h exp %h", a, rsp1.data, e1); end
    if (!rsp2.hit || rsp2.data !== e2) begin failures++; $display("FAIL two  %h got %h exp %h", a, rsp2.data, e2); end
  endtask

  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    q = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // flat area and initial window (map = 0)
    mwr(16'h8000, 8'hA0);
    mwr(16'hFBFF, 8'hA1);
    mwr(16'hFC00, 8'hA2);      // one: 32K SRAM 0x7C00; two: SRAM2 page 0
    mwr(16'hFFFF, 8'hA3);
    chk(16'h8000, 8'hA0, 8'hA0);
    chk(16'hFBFF, 8'hA1, 8'hA1);
    chk(16'hFC00, 8'hA2, 8'hA2);
    // SRAM 1 pages 0x05 and 0x7F
    out(8'h85);
    mwr(16'hFC10, 8'hB5);
    out(8'hFF);
    mwr(16'hFC10, 8'hBF);
    chk(16'hFC10, 8'hBF, 8'hBF);
    out(8'h85);
    chk(16'hFC10, 8'hB5, 8'hB5);
    // neighbouring pages are distinct and land at page * 1 KB in the chip
    out(8'h84);
    mwr(16'hFC10, 8'hB4);
    out(8'h85);
    chk(16'hFC10, 8'hB5, 8'hB5);
    checks += 2;
    if (dut1.u_sram128_1.mem[17'h05*1024 + 17'h10] !== 8'hB5) begin failures++; $display("FAIL page 5 placement"); end
    if (dut2.u_sram128_1.mem[17'h04*1024 + 17'h10] !== 8'hB4) begin failures++; $display("FAIL page 4 placement"); end
    // bit 7 = 0 with a nonzero page: one-SRAM board ignores the page and sees
    // the 32K SRAM top; two-SRAM board sees SRAM2 page 3
    out(8'h03);
    mwr(16'hFC00, 8'hC3);
    out(8'h00);
    chk(16'hFC00, 8'hC3, 8'hA2);
    out(8'h03);
    chk(16'hFC00, 8'hC3, 8'hC3);
    // the flat region is unaffected by the window
    chk(16'h8000, 8'hA0, 8'hA0);
    // power failure deselects all SRAMs
    power_fail = 1;
    mwr(16'h8000, 8'h00);
    chk(16'h8000, 8'hFF, 8'hFF);
    power_fail = 0;
    chk(16'h8000, 8'hA0, 8'hA0);
    // reset returns the window to its initial place
    rst_n = 0; #1 rst_n = 1;
    chk(16'hFC00, 8'hC3, 8'hA2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
