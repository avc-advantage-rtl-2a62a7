// Self-checking testbench for prog_mem_map.
// Three behavioural EPROMs return a byte that encodes chip and address
// (chip*0x40 ^ addr[15:8] ^ addr[7:0]), so every mapping can be predicted.
// Checks the fixed lower window, the reset (unmapped) state, all EPROM and
// SRAM map codes, SRAM write/read and the no-effect of EPROM writes.
module tb_prog_mem_map;
  import avc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  bus_rsp_t rsp;
  logic [2:0] eprom_cs;
  logic [15:0] eprom_addr;
  logic [2:0][7:0] eprom_data;
  int checks = 0, failures = 0;

  prog_mem_map dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] rom(int chip, logic [15:0] a);
    return 8'(chip * 8'h40) ^ a[15:8] ^ a[7:0];
  endfunction
  always_comb
    for (int i = 0; i < 3; i++) eprom_data[i] = rom(i, eprom_addr);

  task automatic idle(); req = '0; endtask
  task automatic out(logic [7:0] port, logic [7:0] v);
    req = '0; req.iorq = 1; req.wr = 1; req.addr = {8'h00, port}; req.wdata = v;
    @(posedge clk); #1 idle();
  endtask
  task automatic mwr(logic [15:0] a, logic [7:0] v);
    req = '0; req.mreq = 1; req.wr = 1; req.addr = a; req.wdata = v;
    @(posedge clk); #1 idle();
  endtask
  task automatic mrd(logic [15:0] a, output logic [7:0] v);
    req = '0; req.mreq = 1; req.rd = 1; req.addr = a;
    @(posedge clk); #1 idle();
    v = rsp.data;
    if (!rsp.hit) begin failures++; $display("no hit at %h", a); end
  endtask
  task automatic check(logic [15:0] a, logic [7:0] exp);
    logic [7:0] v;
    mrd(a, v);
    checks++;
    if (v !== exp) begin failures++; $display("FAIL rd %h got %h exp %h", a, v, exp); end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    idle();
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // fixed window: EPROM 1, first 16 KB
    check(16'h0000, rom(0, 16'h0000));
    check(16'h1234, rom(0, 16'h1234));
    check(16'h3FFF, rom(0, 16'h3FFF));
    // initially unmapped
    check(16'h4000, 8'hFF);
    check(16'h7ABC, 8'hFF);
    // EPROM codes
    for (int chip = 0; chip < 3; chip++)
      for (int reg2 = 0; reg2 < 4; reg2++) begin
        logic [7:0] code;
        logic [15:0] base;
        code = {4'(1 << chip), 2'b10, 2'(reg2)};
        base = {~2'(reg2), 14'h0};
        out(8'h01, code);
        check(16'h4000, rom(chip, base));
        check(16'h5A5A, rom(chip, base | 16'h1A5A));
        check(16'h0100, rom(0, 16'h0100));
      end
    // writes to EPROM window have no effect on later reads
    mwr(16'h4321, 8'h00);
    check(16'h4321, rom(2, 16'h0321));
    // SRAM, both halves
    out(8'h01, 8'h81);
    mwr(16'h4000, 8'h11); mwr(16'h7FFF, 8'h22);
    out(8'h01, 8'h8E);   // SRAM region 0x4000 (X bits set)
    mwr(16'h4000, 8'h33); mwr(16'h7FFF, 8'h44);
    check(16'h4000, 8'h33); check(16'h7FFF, 8'h44);
    out(8'h01, 8'h8F);
    check(16'h4000, 8'h11); check(16'h7FFF, 8'h22);
    // back to unmapped: writes ignored, reads 0xFF
    out(8'h01, 8'h07);
    mwr(16'h4000, 8'h55);
    check(16'h4000, 8'hFF);
    out(8'h01, 8'h81);
    check(16'h4000, 8'h11);
    // lower window never reaches SRAM
    mwr(16'h0000, 8'h99);
    check(16'h0000, rom(0, 16'h0000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
