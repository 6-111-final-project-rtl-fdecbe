// gps_decoder: serial byte receiver for the GPS data line.
//
// Frames are one low start bit, eight data bits LSB first and one high stop
// bit.  The receiver first checks that the line has been high (idle) for
// IDLE_BITS bit times, so it never starts in the middle of a byte.  It then
// waits for the falling edge of a start bit with the bit timebase stopped
// (counting low), starts the timebase, and uses its mid-bit enable pulses:
// the first checks the start bit is still low, the next eight sample the data
// bits, the tenth checks the stop bit.  With a good stop bit the byte goes to
// data_out with data_ready high for one clock, and the receiver goes back to
// waiting for the next start edge; a bad stop bit sends it back to the idle
// check.  A start bit that is high at mid-bit is taken as a glitch.
// The sequence follows the document; the glitch and framing checks are this
// design's additions.
module gps_decoder #(
  parameter int IDLE_BITS = 8
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       enable,
  input  logic       data,
  output logic       counting,
  output logic       data_ready,
  output logic [7:0] data_out
);
  typedef enum logic [2:0] { R_IDLE_CHECK, R_HUNT, R_START, R_BITS, R_STOP } rx_state_t;

  rx_state_t                      state;
  logic [$clog2(IDLE_BITS+1)-1:0] idle_count;
  logic [2:0]                     bit_index;
  logic [7:0]                     shift;

  always_ff @(posedge clk) begin
    if (reset) begin
      state      <= R_IDLE_CHECK;
      idle_count <= '0;
      bit_index  <= '0;
      shift      <= '0;
      counting   <= 1'b0;
      data_ready <= 1'b0;
      data_out   <= '0;
    end else begin
      data_ready <= 1'b0;
      unique case (state)
        R_IDLE_CHECK:
          if (!data) begin
            // line low: start bit if the line was idle long enough
            idle_count <= '0;
            counting   <= 1'b0;
            if (idle_count == ($bits(idle_count))'(IDLE_BITS)) state <= R_START;
          end else begin
            counting <= 1'b1;
            if (enable && idle_count != ($bits(idle_count))'(IDLE_BITS))
              idle_count <= idle_count + 1'b1;
          end
        R_HUNT: begin
          counting <= 1'b0;
          if (!data) state <= R_START;
        end
        R_START: begin
          counting <= 1'b1;
          if (enable) begin
            bit_index <= '0;
            state     <= data ? R_HUNT : R_BITS;
          end
        end
        R_BITS:
          if (enable) begin
            shift     <= {data, shift[7:1]};
            bit_index <= bit_index + 1'b1;
            if (bit_index == 3'd7) state <= R_STOP;
          end
        R_STOP:
          if (enable) begin
            counting <= 1'b0;
            if (data) begin
              data_out   <= shift;
              data_ready <= 1'b1;
              state      <= R_HUNT;
            end else begin
              state <= R_IDLE_CHECK;
            end
          end
        default: state <= R_IDLE_CHECK;
      endcase
    end
  end
endmodule
