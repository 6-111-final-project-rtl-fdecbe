// gps_clock: bit timebase of the GPS serial receiver.
//
// While counting is high a counter runs from 0 to CLOCKS_PER_BIT-1 and
// enable pulses for one clock when the counter is half way through.  The
// default of 5207 clocks at 25 MHz gives one pulse per bit at 4800 bit/s.
// The receiver holds counting low until it sees the edge of a start bit, so
// the first pulse falls in the middle of that bit and every later pulse in
// the middle of a data bit.  Reset or counting low clear the counter.
//
// Origin: 5207 clocks per bit at 25 MHz is the original report's figure; the
// report counts to 5207 inclusive, this counter wraps after 5206 (4801 bit/s).
// The mid-count pulse phase is this design's choice.
module gps_clock #(
  parameter int CLOCKS_PER_BIT = 5207
) (
  input  logic clk,
  input  logic reset,
  input  logic counting,
  output logic enable
);
  localparam int CW = $clog2(CLOCKS_PER_BIT);
  logic [CW-1:0] counter;

  always_ff @(posedge clk) begin
    if (reset || !counting) begin
      counter <= '0;
      enable  <= 1'b0;
    end else begin
      enable  <= (counter == CW'(CLOCKS_PER_BIT / 2 - 1));
      counter <= (counter == CW'(CLOCKS_PER_BIT - 1)) ? '0 : counter + 1'b1;
    end
  end
endmodule
