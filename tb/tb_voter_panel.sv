// Self-checking testbench for voter_panel at full size (504 switches).
// A reference switch matrix is read column by column through every subpanel
// port; LED patterns, column drive, booth light, Cast Vote lamp and button
// encoding and the CTC1/0 strobe are checked against the rules of the panel.
module tb_voter_panel;
  import avc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [1:0][5:0][5:0][6:0] vp_sw;
  logic [1:0][5:0] col_drv;
  logic [1:0][5:0][6:0] row_drv;
  logic booth_light, cast_lamp, cast_btn = 0, ctc_trg_n;
  int trg_low = 0;
  voter_panel dut (.*);
  always @(posedge clk) if (!ctc_trg_n) trg_low++;
  function automatic logic [6:0] sw_pat(int g, int s, int c);
    return 7'((g * 37 + s * 11 + c * 5 + 3) * 29);
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
    for (int g = 0; g < 2; g++) for (int s = 0; s < 6; s++) for (int c = 0; c < 6; c++)
      vp_sw[g][s][c] = sw_pat(g, s, c);
    expect_eq("initial column", col_drv, {6'b000001, 6'b000001});
    for (int c = 0; c < 6; c++) begin
      out(8'h47, 8'(c));
      out(8'h4F, 8'(5 - c));
      expect_eq("col drive", col_drv, {6'(1 << (5 - c)), 6'(1 << c)});
      for (int s = 0; s < 6; s++) begin
        expect_in(8'h40 + 8'(s), {1'b0, sw_pat(0, s, c)});
        expect_in(8'h48 + 8'(s), {1'b0, sw_pat(1, s, 5 - c)});
      end
    end
    // display patterns
    for (int s = 0; s < 6; s++) begin
      out(8'h40 + 8'(s), 8'h80 | 8'(s + 1));
      out(8'h48 + 8'(s), 8'(7'h40 >> s));
    end
    for (int s = 0; s < 6; s++) begin
      expect_eq("row left", row_drv[0][s], 7'(s + 1));
      expect_eq("row right", row_drv[1][s], 7'h40 >> s);
    end
    out(8'h47, 8'h02);                 // pattern carries over to the new column
    expect_eq("row kept", row_drv[0][3], 7'd4);
    expect_eq("col 2", col_drv[0], 6'b000100);
    out(8'h47, 8'h06);                 // no column
    expect_eq("no col", col_drv[0], 6'b0);
    expect_in(8'h40, 8'h00);
    // booth light
    expect_eq("light off", booth_light, 0);
    out(8'h46, 8'h80); expect_eq("light on", booth_light, 1);
    out(8'h46, 8'h7F); expect_eq("light off again", booth_light, 0);
    expect_in(8'h46, 8'h00);
    // Cast Vote
    cast_btn = 1; expect_in(8'h4E, 8'h03);
    cast_btn = 0; expect_in(8'h4E, 8'h03);
    out(8'h4E, 8'h40); expect_eq("lamp", cast_lamp, 1);
    cast_btn = 1; expect_in(8'h4E, 8'h02);
    cast_btn = 0; expect_in(8'h4E, 8'h01);
    out(8'h4E, 8'hBF); expect_eq("lamp off", cast_lamp, 0);
    // CTC1/0 strobe: one low cycle per I/O to 0x4F (7 so far) 
    expect_eq("ctc strobe", trg_low, 6);
    out(8'h4F, 8'h00);
    expect_eq("ctc strobe 2", trg_low, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
