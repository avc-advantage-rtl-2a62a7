// End-to-end testbench for avc_board at its default parameters.
// Plays the role of the Z80: it runs a boot-like sequence of memory and I/O
// cycles over the board's bus, with behavioural EPROMs, configuration EPROM,
// RTC, LCD controllers and CTC chips around it.  Every mechanism of the board
// is exercised at least once and counted (program-window paging, data-window
// paging, power-fail deselection, configuration EPROM, scratch SRAM paging,
// RTC one-shot addressing, cartridge arming / auto-increment / invalidation /
// removal, opcode-fetch NMI, watchdog NMI after 1.6 s at 4 MHz, power latch,
// printer, both panels, keyboard, ADC conversion, CTC wiring, floating bus);
// a mechanism that never happened counts as a failure.  Expected values come
// from the board's rules written out here, not from the RTL.
module tb_avc_board;
  import avc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bus_req_t req;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [7:0] rdata;
  logic nmi, nmi_fetch, nmi_wdt, power_fail = 0;
  logic [2:0] eprom_cs;
  logic [15:0] eprom_addr;
  logic [2:0][7:0] eprom_data;
  logic [12:0] cfg_addr;
  logic cfg_oe;
  logic [7:0] cfg_data;
  logic rtc_as, rtc_ds, rtc_rw;
  logic [7:0] rtc_ad_o, rtc_ad_i;
  logic rtc_int_n = 1;
  logic [1:0] cart_present = 2'b11, cart_led;
  logic print_more = 0, polls_open = 1, polls_closed = 0, knob_on = 1, ac_on = 1, no_batt = 0;
  logic pwron, vp_bus_pwr, vp_light_pwr, psu_hold;
  logic [7:0] pp_data;
  logic [3:0] pp_ctrl;
  logic [4:0] pp_status = 5'b01000;
  logic [14:0] op_sw = '0;
  logic [15:0] op_led;
  logic speaker;
  logic op_lcd_e, op_lcd_rs, op_lcd_rw, op_lcd_d_oe;
  logic [7:0] op_lcd_d_o, op_lcd_d_i = 8'h00;
  logic [1:0][5:0][5:0][6:0] vp_sw = '0;
  logic [1:0][5:0] vp_col_drv;
  logic [1:0][5:0][6:0] vp_row_drv;
  logic booth_light, cast_lamp, cast_btn = 0;
  logic vl_lcd_e, vl_lcd_rs, vl_lcd_rw, vl_lcd_d_oe;
  logic [7:0] vl_lcd_d_o, vl_lcd_d_i = 8'h00;
  logic [4:0][7:0] vk_keys = '0;
  logic [7:0][7:0] adc_in;
  logic [1:0] ctc_ce;
  logic [7:0] ctc_rdata = 8'hC7;
  logic [3:0] ctc0_trg, ctc1_trg;
  logic ctc1_zcto1 = 0;

  avc_board dut (.*);

  // The board answers on rdata; adapt it to the rsp used by the shared tasks.
  assign rsp = '{hit: 1'b1, data: rdata};

  // Program EPROMs: byte = chip * 0x40 ^ A15:A8 ^ A7:A0.
  function automatic logic [7:0] rom(int chip, logic [15:0] a);
    return 8'(chip * 8'h40) ^ a[15:8] ^ a[7:0];
  endfunction
  always_comb for (int i = 0; i < 3; i++) eprom_data[i] = rom(i, eprom_addr);
  // Configuration EPROM: byte = ~address.
  assign cfg_data = ~cfg_addr[7:0];
  bq3285_model u_rtc (.clk, .as(rtc_as), .ds(rtc_ds), .rw(rtc_rw), .ad_i(rtc_ad_o), .ad_o(rtc_ad_i));

  // Mechanism counters.
  typedef enum int {M_PWIN, M_PUNMAP, M_PSRAM, M_DWIN, M_PFAIL, M_CFG, M_SCRATCH, M_RTC, M_RTC_DROP,
                    M_CART, M_CART_AAI, M_CART_INVAL, M_CART_UNARMED, M_CART_REMOVE, M_NMI_FETCH,
                    M_NMI_WDT, M_PWR, M_LPT, M_OPLCD, M_OPLED, M_SPK, M_VPSCAN, M_CAST, M_KBD,
                    M_VLCD, M_ADC, M_CTC, M_CTC_TRG, M_FLOAT, M_COUNT} mech_t;
  int mech [M_COUNT];
  int cycle = 0, n_fetch = 0, n_wdt = 0, wdt_cycle = 0;
  int op_e = 0, vl_e = 0, div_edges = 0, trg4f = 0;
  logic div_prev = 0;
  always @(posedge clk) begin
    cycle++;
    if (nmi_fetch) n_fetch++;
    if (nmi_wdt) begin n_wdt++; wdt_cycle = cycle; end
    if (op_lcd_e) op_e++;
    if (vl_lcd_e) vl_e++;
    if (ctc0_trg[0] != div_prev) div_edges++;
    div_prev = ctc0_trg[0];
    if (!ctc1_trg[0]) trg4f++;
  end

  task automatic mwr(logic [15:0] a, logic [7:0] v);
    req = '0; req.mreq = 1; req.wr = 1; req.addr = a; req.wdata = v;
    @(posedge clk); #1 req = '0;
  endtask
  task automatic expect_mem(logic [15:0] a, logic [7:0] exp, bit m1 = 0);
    req = '0; req.mreq = 1; req.rd = 1; req.m1 = m1; req.addr = a;
    @(posedge clk); #1 req = '0;
    checks++;
    if (rdata !== exp) begin failures++; $display("FAIL mem %h got %h exp %h", a, rdata, exp); end
  endtask
  task automatic cart_addr(logic [7:0] base, int a, bit inval = 0, bit aai = 0, bit led = 0);
    out(base, 8'(a));
    out(base | 8'h01, {inval, 2'b00, 5'(a >> 8)});
    out(base | 8'h03, {aai, led, 2'b00, 4'(a >> 13)});
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
    #200000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    req = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // ---- power-up: hold the supply, kick the watchdog
    expect_in(8'h06, 8'h62);                       // AC, knob on, polls open
    out(8'h04, 8'h0D);                             // PWRON + panel power
    knob_on = 0; #1;
    expect_eq("supply held", {psu_hold, vp_bus_pwr, vp_light_pwr}, 3'b111);
    expect_in(8'h06, 8'h42);
    mech[M_PWR]++;
    // ---- program memory
    expect_mem(16'h0000, rom(0, 16'h0000));
    expect_mem(16'h4000, 8'hFF);  mech[M_PUNMAP]++;
    out(8'h01, 8'h21);                              // EPROM 2 region 0x8000
    expect_mem(16'h4123, rom(1, 16'h8123));
    out(8'h01, 8'h4C);                              // EPROM 3 region 0xC000
    expect_mem(16'h7FFF, rom(2, 16'hFFFF));  mech[M_PWIN]++;
    out(8'h01, 8'h80);                              // program SRAM upper half
    mwr(16'h4567, 8'h3A);
    expect_mem(16'h4567, 8'h3A);
    out(8'h01, 8'h81);                              // program SRAM lower half
    mwr(16'h4567, 8'h3B);
    expect_mem(16'h4567, 8'h3B);
    out(8'h01, 8'h80);
    expect_mem(16'h4567, 8'h3A);  mech[M_PSRAM]++;
    // code can run from the program SRAM without an NMI
    expect_mem(16'h4567, 8'h3A, 1);
    expect_eq("no nmi from program sram", n_fetch, 0);
    // ---- data memory
    mwr(16'h8000, 8'h01); mwr(16'hFBFF, 8'h02); mwr(16'hFC00, 8'h03);
    out(8'h02, 8'h85);
    mwr(16'hFC00, 8'h85);
    out(8'h02, 8'h86);
    mwr(16'hFC00, 8'h86);
    out(8'h02, 8'h85); expect_mem(16'hFC00, 8'h85);
    out(8'h02, 8'h86); expect_mem(16'hFC00, 8'h86);
    out(8'h02, 8'h00); expect_mem(16'hFC00, 8'h03);  mech[M_DWIN]++;
    expect_mem(16'h8000, 8'h01); expect_mem(16'hFBFF, 8'h02);
    power_fail = 1; expect_mem(16'h8000, 8'hFF); mwr(16'h8000, 8'hEE); power_fail = 0;
    expect_mem(16'h8000, 8'h01);  mech[M_PFAIL]++;
    // ---- opcode fetch from data RAM -> NMI
    expect_mem(16'h8000, 8'h01, 1);
    expect_eq("fetch nmi", n_fetch, 1);
    expect_in(8'h07, 8'h02);
    out(8'h05, 8'h00);
    expect_in(8'h07, 8'h00);  mech[M_NMI_FETCH] = n_fetch;
    // ---- configuration EPROM, scratch SRAM, RTC
    expect_in(8'h30, 8'hFF, 8'h00);
    expect_in(8'h3B, 8'h5A, 8'hA5);  mech[M_CFG]++;
    out(8'h95, 8'hC7); out(8'h96, 8'h77, 8'h10);
    out(8'h95, 8'h00); out(8'h96, 8'h11, 8'h10);
    out(8'h95, 8'hC7); expect_in(8'h96, 8'h77, 8'h10);
    out(8'h95, 8'h00); expect_in(8'h96, 8'h11, 8'h10);  mech[M_SCRATCH]++;
    out(8'h50, 8'h0E); out(8'h52, 8'h42);
    out(8'h50, 8'h0E); expect_in(8'h53, 8'h42);  mech[M_RTC]++;
    expect_in(8'h53, 8'hFF);  mech[M_RTC_DROP]++;
    // ---- results cartridge in slot A (and B)
    expect_in(8'hB4, 8'h12); expect_in(8'hBC, 8'h12);
    cart_addr(8'hB0, 17'h12345); out(8'hB2, 8'h99);        // unarmed: dropped
    out(8'hB5, 8'h10);
    cart_addr(8'hB0, 17'h12345); out(8'hB2, 8'h5C);
    cart_addr(8'hB0, 17'h12345); expect_in(8'hB2, 8'h5C);  mech[M_CART]++;
    mech[M_CART_UNARMED]++;
    cart_addr(8'hB0, 17'h100FE, 0, 1, 1);
    for (int i = 0; i < 4; i++) out(8'hB2, 8'(8'hD0 + i));
    cart_addr(8'hB0, 17'h100FE, 0, 1, 1);
    for (int i = 0; i < 4; i++) expect_in(8'hB2, 8'(8'hD0 + i));
    expect_eq("cart led", cart_led, 2'b01);
    cart_addr(8'hB0, 17'h10000); expect_in(8'hB2, 8'hD2);  mech[M_CART_AAI]++;
    cart_addr(8'hB0, 17'h12345, 1); expect_in(8'hB2, 8'hFF);
    cart_addr(8'hB0, 17'h1C000); expect_in(8'hB2, 8'hFF);  mech[M_CART_INVAL]++;
    cart_present = 2'b10; @(posedge clk); #1;
    expect_in(8'hB4, 8'hFF);
    cart_present = 2'b11; @(posedge clk); #1;
    cart_addr(8'hB0, 17'h12345); out(8'hB2, 8'h00);         // disarmed by removal
    cart_addr(8'hB0, 17'h12345); expect_in(8'hB2, 8'h5C);  mech[M_CART_REMOVE]++;
    expect_eq("ctc0/3 = slot B present", ctc0_trg[3], 1);
    // ---- printer
    out(8'h90, 8'h41); out(8'h92, 8'h01);
    expect_eq("printer", {pp_data, pp_ctrl}, 12'h411);
    expect_in(8'h91, 8'h40);
    expect_eq("ctc1/2 = ack", ctc1_trg[2], 1);  mech[M_LPT]++;
    // ---- operator panel
    out(8'h10, 8'h38); out(8'h12, 8'h41); expect_in(8'h11, 8'h00);
    expect_eq("op lcd strobes", op_e, 3);  mech[M_OPLCD] = op_e;
    op_sw = 15'h0201;
    out(8'h16, 8'h5A); out(8'h17, 8'h80);
    expect_eq("op leds", op_led, 16'h805A);
    expect_in(8'h14, 8'h81); expect_in(8'h15, 8'h04);  mech[M_OPLED]++;
    for (int i = 0; i < 4; i++) begin
      ctc1_zcto1 = 1; @(posedge clk); #1 ctc1_zcto1 = 0; @(posedge clk); #1;
    end
    expect_eq("speaker after 4 pulses", speaker, 0);
    ctc1_zcto1 = 1; @(posedge clk); #1 ctc1_zcto1 = 0; @(posedge clk); #1;
    expect_eq("speaker after 5 pulses", speaker, 1);  mech[M_SPK]++;
    // ---- voter panel: scan all columns of both groups
    vp_sw[0][2][4] = 7'h15; vp_sw[1][5][1] = 7'h6A;
    for (int c = 0; c < 6; c++) begin
      out(8'h47, 8'(c)); out(8'h4F, 8'(c));
      expect_in(8'h42, c == 4 ? 8'h15 : 8'h00);
      expect_in(8'h4D, c == 1 ? 8'h6A : 8'h00);
      out(8'h40, 8'(c)); out(8'h4D, 8'(c + 8'h10));
      expect_eq("vp leds", {vp_col_drv[0], vp_row_drv[0][0], vp_row_drv[1][5]},
                {6'(1 << c), 7'(c), 7'(c + 16)});
    end
    mech[M_VPSCAN]++;
    out(8'h46, 8'h80); expect_eq("booth light", booth_light, 1);
    expect_in(8'h4E, 8'h03);
    out(8'h4E, 8'h40); cast_btn = 1; expect_in(8'h4E, 8'h02);
    cast_btn = 0; expect_in(8'h4E, 8'h01);  mech[M_CAST]++;
    expect_eq("ctc1/0 strobes", trg4f, 6);
    // ---- voter LCD and keyboard
    out(8'h70, 8'h01); vl_lcd_d_i = 8'h2B; expect_in(8'h73, 8'h2B);
    expect_eq("voter lcd strobes", vl_e, 2);  mech[M_VLCD] = vl_e;
    vk_keys[1] = 8'h84; vk_keys[2] = 8'hFF;
    out(8'h74, 8'h02); expect_in(8'h75, 8'h84);
    out(8'h74, 8'h04); expect_in(8'h75, 8'h1F);  mech[M_KBD]++;
    // ---- voltage monitor
    for (int ch = 0; ch < 8; ch++) adc_in[ch] = 8'(8'h10 * ch + 8'h05);
    out(8'h60, 8'h06); out(8'h61, 8'h00);
    begin
      logic [7:0] v;
      int t0, n;
      t0 = cycle;
      do inp(8'h63, v); while (v[7]);
      do inp(8'h63, v); while (!v[7]);
      n = cycle - t0;
      checks++;
      if (n < 63 * 128 || n > 64 * 128 + 8) begin failures++; $display("FAIL conversion took %0d", n); end
    end
    expect_in(8'h62, 8'h65);  mech[M_ADC]++;
    // ---- CTCs
    expect_in(8'hA2, 8'hC7); expect_in(8'hAB, 8'hC7);
    expect_in(8'hA4, 8'hFF);
    checks++; if (div_edges < 10) begin failures++; $display("FAIL divider idle"); end
    mech[M_CTC]++; mech[M_CTC_TRG] = (div_edges > 0 && trg4f > 0) ? div_edges + trg4f : 0;
    // ---- floating bus
    expect_in(8'hEE, 8'hFF);  mech[M_FLOAT]++;
    // ---- watchdog: stop toggling; the NMI must come 1.6 s (6.4 M clocks) later
    out(8'h04, 8'h8D);
    begin
      int t0;
      t0 = cycle;
      wait (n_wdt == 1);
      checks++;
      if (wdt_cycle - t0 < 6_400_000 || wdt_cycle - t0 > 6_400_010) begin
        failures++; $display("FAIL watchdog after %0d", wdt_cycle - t0); end
    end
    mech[M_NMI_WDT] = n_wdt;
    // ---- power down
    out(8'h04, 8'h00);
    expect_eq("supply released", psu_hold, 0);
    for (int m = 0; m < M_COUNT; m++) begin
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never exercised", mech_t'(m)); end
    end
    for (int m = 0; m < M_COUNT; m++) $display("  %-16s %0d", mech_t'(m), mech[m]);
    $display("cycles simulated: %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
