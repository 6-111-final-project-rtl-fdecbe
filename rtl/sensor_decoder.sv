// sensor_decoder: one sweep of the probe, DEPTHS readings in a row.
//
// On a start_sample pulse the decoder drives the switch pattern of depth 0
// on sensor_sel and pulses initiate to the ADC controller.  Each
// sensor_ready returns one byte, which is stored in byte lane k of the
// sweep word; the decoder then switches to depth k+1 and initiates again.
// After the last depth the packed word appears on sensor_stream_raw with a
// one-cycle stream_ready pulse, and the switches are opened (all zero).
// Depth k closes switches k and k+9 (see soil_pkg::sel_pattern), the
// pattern the document lists for its sixteen switch controls.  Requests
// that arrive during a sweep are ignored.
module sensor_decoder
  import soil_pkg::*;
(
  input  logic                clk,
  input  logic                reset,
  input  logic                start_sample,
  input  logic                sensor_ready,
  input  logic [SAMPLE_W-1:0] sensor_data,
  output logic                initiate,
  output logic                stream_ready,
  output logic [SEL_W-1:0]    sensor_sel,
  output logic [STREAM_W-1:0] sensor_stream_raw
);
  logic                busy;
  logic [2:0]          depth;       // depth being read
  logic [STREAM_W-SAMPLE_W-1:0] collect;     // depths 0..DEPTHS-2

  always_ff @(posedge clk) begin
    if (reset) begin
      busy              <= 1'b0;
      depth             <= '0;
      collect           <= '0;
      initiate          <= 1'b0;
      stream_ready      <= 1'b0;
      sensor_sel        <= '0;
      sensor_stream_raw <= '0;
    end else begin
      initiate     <= 1'b0;
      stream_ready <= 1'b0;
      if (!busy) begin
        if (start_sample) begin
          busy       <= 1'b1;
          depth      <= '0;
          initiate   <= 1'b1;
          sensor_sel <= sel_pattern(0);
        end
      end else if (sensor_ready) begin
        if (depth == 3'(DEPTHS - 1)) begin
          busy              <= 1'b0;
          sensor_sel        <= '0;
          stream_ready      <= 1'b1;
          sensor_stream_raw <= {sensor_data, collect};
        end else begin
          collect[depth*SAMPLE_W +: SAMPLE_W] <= sensor_data;
          depth      <= depth + 1'b1;
          initiate   <= 1'b1;
          sensor_sel <= sel_pattern(int'(depth) + 1);
        end
      end
    end
  end
endmodule
