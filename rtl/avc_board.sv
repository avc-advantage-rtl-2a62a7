// AVC Advantage motherboard: memory map and I/O devices around the Z80.
//
// The board is a Z80 system whose 64 KB address space is split in two: the
// low 32 KB is program memory (EPROMs plus an optional SRAM, paged through
// port 0x01) and the high 32 KB is battery-backed data SRAM (with a 1 KB
// window into a 128 KB SRAM, paged through port 0x02).  Everything else is
// reached with Z80 IN/OUT instructions: configuration EPROM (0x3X), scratch
// SRAM (0x95/0x96), real-time clock (0x50-0x53), two results cartridges
// (0xB0-0xBD), NMI status (0x05/0x07), power control and switches
// (0x04/0x06), printer (0x90-0x92), operator panel (0x10-0x17), voter panel
// (0x40-0x4F), voter LCD and keyboard (0x70-0x75), voltage monitor ADC
// (0x60-0x63) and the two CTC timer chips (0xA0-0xA3, 0xA8-0xAB).
//
// The CPU, EPROMs, RTC chip, CTCs and LCD controllers are bought-in parts and
// stay outside: the Z80 bus comes in as req (see avc_pkg for its one-cycle
// request / next-cycle data timing) and the others are reached through pins.
// Both cartridges (with their present signals) and the ADC model are inside.
// Every device registers its read data; this top ORs the answers of the
// device that claimed the read and returns 0xFF when none did (a floating,
// pulled-up bus: this model's choice).  CTC reads are sampled from ctc_rdata.
// Assertions check the request rules and that at most one device answers;
// they are disabled while rst_n is low, which is why lint reports rst_n as
// used both as an asynchronous reset and as a synchronous signal.
//
// Wiring of the CTC trigger inputs follows the board: CTC0/0 = clock / 128,
// CTC0/2 = RTC interrupt, CTC0/3 = cartridge present in slot B, CTC1/0 = low
// during I/O to port 0x4F, CTC1/2 = printer ACK; CTC0/1 and CTC1/3 have no
// input and are tied low.  CTC1 channel 1's ZC/TO output drives the speaker.
module avc_board
  import avc_pkg::*;
#(
  parameter bit          PROG_SRAM_FITTED = 1'b1,
  parameter bit          TWO_BIG_SRAMS    = 1'b0,
  parameter int unsigned WDT_CYCLES       = 6_400_000,
  parameter int unsigned ADC_HALF_PERIOD  = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  // Z80 bus
  input  bus_req_t        req,
  output logic [7:0]      rdata,
  output logic            nmi,
  output logic            nmi_fetch,    // NMI source: opcode fetch from data RAM
  output logic            nmi_wdt,      // NMI source: watchdog
  input  logic            power_fail,
  // program EPROMs 1..3
  output logic [2:0]      eprom_cs,
  output logic [15:0]     eprom_addr,
  input  logic [2:0][7:0] eprom_data,
  // configuration EPROM
  output logic [12:0]     cfg_addr,
  output logic            cfg_oe,
  input  logic [7:0]      cfg_data,
  // real-time clock
  output logic            rtc_as,
  output logic            rtc_ds,
  output logic            rtc_rw,
  output logic [7:0]      rtc_ad_o,
  input  logic [7:0]      rtc_ad_i,
  input  logic            rtc_int_n,
  // cartridges
  input  logic [1:0]      cart_present,
  output logic [1:0]      cart_led,
  // service switches and power control
  input  logic            print_more,
  input  logic            polls_open,
  input  logic            polls_closed,
  input  logic            knob_on,
  input  logic            ac_on,
  input  logic            no_batt,
  output logic            pwron,
  output logic            vp_bus_pwr,
  output logic            vp_light_pwr,
  output logic            psu_hold,
  // printer
  output logic [7:0]      pp_data,
  output logic [3:0]      pp_ctrl,
  input  logic [4:0]      pp_status,
  // operator panel
  input  logic [14:0]     op_sw,
  output logic [15:0]     op_led,
  output logic            speaker,
  output logic            op_lcd_e,
  output logic            op_lcd_rs,
  output logic            op_lcd_rw,
  output logic [7:0]      op_lcd_d_o,
  output logic            op_lcd_d_oe,
  input  logic [7:0]      op_lcd_d_i,
  // voter panel
  input  logic [1:0][5:0][5:0][6:0] vp_sw,
  output logic [1:0][5:0]           vp_col_drv,
  output logic [1:0][5:0][6:0]      vp_row_drv,
  output logic            booth_light,
  output logic            cast_lamp,
  input  logic            cast_btn,
  // voter LCD and keyboard
  output logic            vl_lcd_e,
  output logic            vl_lcd_rs,
  output logic            vl_lcd_rw,
  output logic [7:0]      vl_lcd_d_o,
  output logic            vl_lcd_d_oe,
  input  logic [7:0]      vl_lcd_d_i,
  input  logic [4:0][7:0] vk_keys,
  // voltage monitor: quantised supply voltages on the ADC's eight inputs
  input  logic [7:0][7:0] adc_in,
  // CTC chips
  output logic [1:0]      ctc_ce,
  input  logic [7:0]      ctc_rdata,
  output logic [3:0]      ctc0_trg,
  output logic [3:0]      ctc1_trg,
  input  logic            ctc1_zcto1
);
  localparam int N = 16;

  bus_rsp_t [N-1:0] r;
  cart_bus_t        ca, cb;
  logic [7:0]       ca_rdata, cb_rdata;
  logic             wd_in, slot_b_present, vp_trg_n, div_out;
  logic [2:0]       adc_add;
  logic             adc_ale, adc_start, adc_oe, adc_eoc;
  logic [7:0]       adc_d;
  logic             ctc_rd_q;
  logic [7:0]       ctc_q;

  prog_mem_map #(.PROG_SRAM_FITTED(PROG_SRAM_FITTED)) u_pmem (
    .clk, .rst_n, .req, .rsp(r[0]), .eprom_cs, .eprom_addr, .eprom_data
  );

  data_mem_map #(.TWO_BIG_SRAMS(TWO_BIG_SRAMS)) u_dmem (
    .clk, .rst_n, .req, .rsp(r[1]), .power_fail
  );

  cfg_eprom_port u_cfg (.clk, .rst_n, .req, .rsp(r[2]), .cfg_addr, .cfg_oe, .cfg_data);

  scratch_sram u_scratch (.clk, .rst_n, .req, .rsp(r[3]));

  rtc_port u_rtc (
    .clk, .rst_n, .req, .rsp(r[4]), .rtc_as, .rtc_ds, .rtc_rw, .rtc_ad_o, .rtc_ad_i
  );

  cart_slots u_slots (
    .clk, .rst_n, .req, .rsp(r[5]), .present(cart_present), .ca, .cb,
    .ca_rdata, .cb_rdata, .slot_b_present
  );

  results_cartridge u_cart_a (
    .clk, .rst_n, .present(cart_present[0]), .c(ca), .c_rdata(ca_rdata), .led(cart_led[0])
  );

  results_cartridge u_cart_b (
    .clk, .rst_n, .present(cart_present[1]), .c(cb), .c_rdata(cb_rdata), .led(cart_led[1])
  );

  nmi_ctrl #(.WDT_CYCLES(WDT_CYCLES)) u_nmi (
    .clk, .rst_n, .req, .rsp(r[6]), .wd_in, .pwron, .nmi, .nmi_fetch, .nmi_wdt
  );

  power_ctrl u_pwr (
    .clk, .rst_n, .req, .rsp(r[7]), .print_more, .polls_open, .polls_closed,
    .knob_on, .ac_on, .no_batt, .pwron, .vp_bus_pwr, .vp_light_pwr, .wd_in, .psu_hold
  );

  printer_port u_lpt (.clk, .rst_n, .req, .rsp(r[8]), .pp_data, .pp_ctrl, .pp_status);

  op_panel u_op (
    .clk, .rst_n, .req, .rsp(r[9]), .sw(op_sw), .led(op_led), .ctc_zcto(ctc1_zcto1),
    .speaker, .lcd_e(op_lcd_e), .lcd_rs(op_lcd_rs), .lcd_rw(op_lcd_rw),
    .lcd_d_o(op_lcd_d_o), .lcd_d_oe(op_lcd_d_oe), .lcd_d_i(op_lcd_d_i)
  );

  voter_panel u_vp (
    .clk, .rst_n, .req, .rsp(r[10]), .vp_sw, .col_drv(vp_col_drv), .row_drv(vp_row_drv),
    .booth_light, .cast_lamp, .cast_btn, .ctc_trg_n(vp_trg_n)
  );

  lcd_port #(.BASE(8'h70)) u_vlcd (
    .clk, .rst_n, .req, .rsp(r[11]), .lcd_e(vl_lcd_e), .lcd_rs(vl_lcd_rs),
    .lcd_rw(vl_lcd_rw), .lcd_d_o(vl_lcd_d_o), .lcd_d_oe(vl_lcd_d_oe), .lcd_d_i(vl_lcd_d_i)
  );

  voter_keyboard u_kbd (.clk, .rst_n, .req, .rsp(r[12]), .keys(vk_keys));

  clk_divider #(.HALF_PERIOD(ADC_HALF_PERIOD)) u_div (.clk, .rst_n, .div_out);

  adc_port u_adcp (
    .clk, .rst_n, .req, .rsp(r[13]), .adc_add, .adc_ale, .adc_start, .adc_oe, .adc_eoc, .adc_d
  );

  adc0808_model u_adc (
    .clk, .rst_n, .clock(div_out), .in_code(adc_in), .add(adc_add), .ale(adc_ale),
    .start(adc_start), .oe(adc_oe), .eoc(adc_eoc), .d(adc_d)
  );

  // CTC chip enables and read capture.
  assign ctc_ce[0] = req.iorq && req.addr[7:2] == 6'b1010_00;
  assign ctc_ce[1] = req.iorq && req.addr[7:2] == 6'b1010_10;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctc_rd_q <= 1'b0;
      ctc_q    <= 8'h00;
    end else begin
      ctc_rd_q <= |ctc_ce && req.rd;
      ctc_q    <= ctc_rdata;
    end
  end
  assign r[14] = '{hit: ctc_rd_q, data: ctc_rd_q ? ctc_q : 8'h00};
  assign r[15] = '{hit: 1'b0, data: 8'h00};

  assign ctc0_trg = {slot_b_present, rtc_int_n, 1'b0, div_out};
  assign ctc1_trg = {1'b0, pp_status[3], 1'b0, vp_trg_n};

  // Bus rules of the request model: one cycle type and one direction at a
  // time, and never more than one device answering a read.
  logic [N-1:0] hits;
  always_comb for (int i = 0; i < N; i++) hits[i] = r[i].hit;

  a_one_cycle_type: assert property (@(posedge clk) disable iff (!rst_n) !(req.mreq && req.iorq))
    else $error("memory and I/O request in the same cycle");
  a_one_direction:  assert property (@(posedge clk) disable iff (!rst_n) !(req.rd && req.wr))
    else $error("read and write in the same cycle");
  a_one_answer:     assert property (@(posedge clk) disable iff (!rst_n) (hits & (hits - 1'b1)) == '0)
    else $error("several devices answered one read: %b", hits);

  always_comb begin
    logic any;
    any   = 1'b0;
    rdata = 8'h00;
    for (int i = 0; i < N; i++) begin
      any   |= r[i].hit;
      rdata |= r[i].data;
    end
    if (!any) rdata = 8'hFF;
  end
endmodule
