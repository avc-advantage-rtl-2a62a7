// Byte-wide static RAM with a synchronous read port.
//
// A chip-enabled write stores wdata at addr on the clock edge; a chip-enabled
// read returns the byte at addr in the following cycle.  Used for every SRAM
// chip on the board and in the cartridge.  Contents are not initialised, as
// in a real SRAM after its battery has been removed.
module sram #(
  parameter int unsigned DEPTH = 32768,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          cs,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (cs) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
