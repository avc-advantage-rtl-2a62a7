// Voter panel: 504 candidate switches and LEDs, booth light and Cast Vote.
//
// The panel is two groups (left, right) of six subpanels, each a grid of
// 6 columns by 7 rows of switches with matching LEDs.  Each group scans one
// column at a time.  An OUT of 0-5 to the group's column port (0x47 left,
// 0x4F right) selects its active column (0 after reset); other values select
// no column in this model.  Each subpanel has a port (left 0x40-0x45, right
// 0x48-0x4D; subpanel index = port bits 2:0):
//   IN   bits 6:0 = switches of the active column right now (bit 7 = 0)
//   OUT  bits 6:0 = display pattern, driven onto the active column's LEDs.
// The pattern register persists, so after a column change the new column
// shows the old pattern; software rewrites it while scanning and the lamps'
// persistence makes all columns look lit.  Outputs are the column drive
// (one-hot per group) and the row drive (pattern per subpanel).
// Port 0x46: OUT bit 7 switches the booth light (reads return 0).  Port 0x4E:
// OUT bit 6 lights the Cast Vote button; IN returns bits 1:0 = 11 while it is
// dark, and 10 (pressed) or 01 (released) while lit.  ctc_trg_n goes low
// during any I/O cycle to port 0x4F (CTC1 channel 0 input).  All of this
// follows the board description; clearing patterns on reset is a choice.
// Reads appear on rsp one cycle after the request.
module voter_panel
  import avc_pkg::*;
#(
  parameter int unsigned GROUPS    = 2,
  parameter int unsigned SUBPANELS = 6,
  parameter int unsigned COLS      = 6,
  parameter int unsigned ROWS      = 7
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp,
  input  logic [GROUPS-1:0][SUBPANELS-1:0][COLS-1:0][ROWS-1:0] vp_sw,
  output logic [GROUPS-1:0][COLS-1:0]                          col_drv,
  output logic [GROUPS-1:0][SUBPANELS-1:0][ROWS-1:0]           row_drv,
  output logic     booth_light,
  output logic     cast_lamp,
  input  logic     cast_btn,
  output logic     ctc_trg_n
);

  logic [GROUPS-1:0][2:0]                          col_q;
  logic [GROUPS-1:0][SUBPANELS-1:0][ROWS-1:0]      pat_q;
  logic        grp, io;
  logic [2:0]  sub;
  logic        rd_q;
  logic [7:0]  data_q, rdata;
  logic        claim;

  assign io  = req.iorq && (req.rd || req.wr) && req.addr[7:4] == 4'h4;
  assign grp = req.addr[3];
  assign sub = req.addr[2:0];
  assign ctc_trg_n = !(req.iorq && req.addr[7:0] == 8'h4F);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q       <= '0;
      pat_q       <= '0;
      booth_light <= 1'b0;
      cast_lamp   <= 1'b0;
    end else if (io && req.wr) begin
      if (sub == 3'd7)                     col_q[grp] <= req.wdata[2:0];
      else if (32'(sub) < SUBPANELS)       pat_q[grp][sub] <= req.wdata[ROWS-1:0];
      else if (sub == 3'd6 && !grp)        booth_light <= req.wdata[7];
      else if (sub == 3'd6 &&  grp)        cast_lamp   <= req.wdata[6];
    end
  end

  always_comb begin
    for (int g = 0; g < GROUPS; g++)
      for (int c = 0; c < COLS; c++)
        col_drv[g][c] = 32'(col_q[g]) == c;
    for (int g = 0; g < GROUPS; g++)
      for (int s = 0; s < SUBPANELS; s++)
        row_drv[g][s] = pat_q[g][s];
  end

  // Read value of an input cycle.
  always_comb begin
    rdata = 8'h00;
    claim = 1'b0;
    if (io && req.rd) begin
      if (32'(sub) < SUBPANELS) begin
        claim = 1'b1;
        for (int c = 0; c < COLS; c++)
          if (col_drv[grp][c]) rdata[ROWS-1:0] = vp_sw[grp][sub][c];
      end else if (sub == 3'd6) begin
        claim = 1'b1;
        if (grp) rdata[1:0] = cast_lamp ? {cast_btn, !cast_btn} : 2'b11;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q   <= 1'b0;
      data_q <= 8'h00;
    end else begin
      rd_q   <= claim;
      data_q <= rdata;
    end
  end

  assign rsp = '{hit: rd_q, data: rd_q ? data_q : 8'h00};
endmodule
