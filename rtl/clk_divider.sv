// Binary counter that divides the system clock by 128.
//
// div_out inverts every HALF_PERIOD (64) system clocks, giving the clock of
// the voltage-monitor ADC and the CLK/TRG input of CTC0 channel 0, as on the
// board.  It is produced as a registered level in the system clock domain
// (used as a clock enable source, not as a clock); it starts low after reset.
module clk_divider #(
  parameter int unsigned HALF_PERIOD = 64
) (
  input  logic clk,
  input  logic rst_n,
  output logic div_out
);
  localparam int CW = (HALF_PERIOD > 1) ? $clog2(HALF_PERIOD) : 1;
  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      div_out <= 1'b0;
    end else if (cnt_q == CW'(HALF_PERIOD - 1)) begin
      cnt_q   <= '0;
      div_out <= !div_out;
    end else begin
      cnt_q <= cnt_q + 1'b1;
    end
  end
endmodule
