// Write-in keyboard on the voter panel.
//
// The keys are wired as five banks of up to eight.  An OUT to port 0x74 sets
// the bank-select byte (one-hot: 0x01, 0x02, 0x04, 0x08, 0x10); an IN from
// port 0x75 returns the keys of the selected bank, 1 = pressed.  Bit positions
// with no key always read 0: bank 0x01 bit 7, bank 0x04 bits 7:5 and bank
// 0x10 bit 7.  This follows the board description.  If several bank bits are
// set, the selected banks are ORed as in a scanned matrix, and the select byte
// clears on reset; both are this model's choices.  Reads appear on rsp one
// cycle after the request.
module voter_keyboard
  import avc_pkg::*;
#(
  parameter logic [7:0] PORT_BANK = 8'h74,
  parameter logic [7:0] PORT_KEYS = 8'h75
) (
  input  logic           clk,
  input  logic           rst_n,
  input  bus_req_t       req,
  output bus_rsp_t       rsp,
  input  logic [4:0][7:0] keys
);
  localparam logic [4:0][7:0] KEY_MASK = {8'h7F, 8'hFF, 8'h1F, 8'hFF, 8'h7F};

  logic [4:0] bank_q;
  logic       rd_q;
  logic [7:0] data_q, scan;

  always_comb begin
    scan = 8'h00;
    for (int b = 0; b < 5; b++)
      if (bank_q[b]) scan |= keys[b] & KEY_MASK[b];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank_q <= '0;
      rd_q   <= 1'b0;
      data_q <= 8'h00;
    end else begin
      if (io_wr(req, PORT_BANK)) bank_q <= req.wdata[4:0];
      rd_q   <= io_rd(req, PORT_KEYS);
      data_q <= scan;
    end
  end

  assign rsp = '{hit: rd_q, data: rd_q ? data_q : 8'h00};
endmodule
