// Behavioural model of the ADC0808 eight-channel 8-bit converter.
//
// The analog inputs are replaced by an already-quantised 8-bit code per
// channel (in_code), so the model covers only the converter's digital
// behaviour.  ALE latches the channel address.  START samples the selected
// channel and begins a conversion: EOC stays high for EOC_HIGH_CLKS (8) ADC
// clocks, goes low for EOC_LOW_CLKS (56) ADC clocks and then returns high with
// the result latched; OE puts the result on d (0 otherwise).  EOC is high
// after reset.  This timing is the one given for the board's converter.
// Because the board's ALE/START/OE pulses are shorter than an ADC clock
// period, the model runs on the system clock (clk, a port the real part does
// not have) and counts rising edges of the CLOCK pin level.
module adc0808_model #(
  parameter int unsigned EOC_HIGH_CLKS = 8,
  parameter int unsigned EOC_LOW_CLKS  = 56
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clock,
  input  logic [7:0][7:0] in_code,
  input  logic [2:0]     add,
  input  logic           ale,
  input  logic           start,
  input  logic           oe,
  output logic           eoc,
  output logic [7:0]     d
);
  typedef enum logic [1:0] {IDLE, SETTLE, CONVERT} state_t;

  state_t     state_q;
  logic [2:0] add_q;
  logic [7:0] sample_q, result_q;
  logic [6:0] cnt_q;
  logic       clock_q, tick;

  assign tick = clock && !clock_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= IDLE;
      add_q    <= '0;
      sample_q <= 8'h00;
      result_q <= 8'h00;
      cnt_q    <= '0;
      clock_q  <= 1'b0;
    end else begin
      clock_q <= clock;
      if (ale) add_q <= add;
      if (start) begin
        state_q  <= SETTLE;
        sample_q <= in_code[ale ? add : add_q];
        cnt_q    <= '0;
      end else if (tick) begin
        unique case (state_q)
          IDLE: ;
          SETTLE:
            if (32'(cnt_q) == EOC_HIGH_CLKS - 1) begin
              state_q <= CONVERT;
              cnt_q   <= '0;
            end else cnt_q <= cnt_q + 1'b1;
          CONVERT:
            if (32'(cnt_q) == EOC_LOW_CLKS - 1) begin
              state_q  <= IDLE;
              result_q <= sample_q;
              cnt_q    <= '0;
            end else cnt_q <= cnt_q + 1'b1;
          default: state_q <= IDLE;
        endcase
      end
    end
  end

  assign eoc = state_q != CONVERT;
  assign d   = oe ? result_q : 8'h00;
endmodule
