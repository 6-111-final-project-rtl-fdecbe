// sensor_clock: timebase that paces the ADC and switch sequence.
//
// While active is high a counter runs from 0 to CLOCKS_PER_SAMPLE-1 and
// enable pulses for one clock when the counter is half way, so with a
// 25 MHz clock and the default of 500 the pulses come at 50 kHz, the first
// one CLOCKS_PER_SAMPLE/2 clocks after active rises.  When active is low,
// or during reset, the counter is cleared and enable stays low, so every
// burst of pulses starts with the same phase.
//
// Origin: the 500-clock (50 kHz) period is the original report's; the phase
// of the first pulse is this design's choice.
module sensor_clock #(
  parameter int CLOCKS_PER_SAMPLE = 500
) (
  input  logic clk,
  input  logic reset,
  input  logic active,
  output logic enable
);
  localparam int CW = $clog2(CLOCKS_PER_SAMPLE);
  logic [CW-1:0] counter;

  always_ff @(posedge clk) begin
    if (reset || !active) begin
      counter <= '0;
      enable  <= 1'b0;
    end else begin
      enable  <= (counter == CW'(CLOCKS_PER_SAMPLE / 2 - 1));
      counter <= (counter == CW'(CLOCKS_PER_SAMPLE - 1)) ? '0 : counter + 1'b1;
    end
  end
endmodule
