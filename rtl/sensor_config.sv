// sensor_config: zero (dry-soil) calibration of the probe readings.
//
// An update_zero pulse marks the next averaged reading as the zero: when
// ssa_ready comes, that reading is stored in zero_offset and the display is
// cleared.  Any other averaged reading is shown as reading minus zero, per
// depth lane, limited at 0 where the reading is below the zero.
// sensor_display is registered and holds its value between readings;
// display_ready pulses one clock after it changes for a measurement (not for
// a zero).  zero_offset starts at 0 after reset, so readings show raw until
// the unit is calibrated.  The per-lane subtraction is this design's reading
// of the document's subtraction of the two 56-bit words.
module sensor_config
  import soil_pkg::*;
(
  input  logic                clk,
  input  logic                reset,
  input  logic                update_zero,
  input  logic [STREAM_W-1:0] sensor_stream_averaged,
  input  logic                ssa_ready,
  output logic [STREAM_W-1:0] zero_offset,
  output logic [STREAM_W-1:0] sensor_display,
  output logic                display_ready
);
  logic                zeroing;
  logic [STREAM_W-1:0] diff;

  always_comb
    for (int d = 0; d < DEPTHS; d++) begin
      logic [SAMPLE_W-1:0] a, z;
      a = sensor_stream_averaged[d*SAMPLE_W +: SAMPLE_W];
      z = zero_offset[d*SAMPLE_W +: SAMPLE_W];
      diff[d*SAMPLE_W +: SAMPLE_W] = (a >= z) ? a - z : '0;
    end

  always_ff @(posedge clk) begin
    if (reset) begin
      zeroing        <= 1'b0;
      zero_offset    <= '0;
      sensor_display <= '0;
      display_ready  <= 1'b0;
    end else begin
      display_ready <= 1'b0;
      if (update_zero) zeroing <= 1'b1;
      if (ssa_ready) begin
        if (zeroing || update_zero) begin
          zero_offset    <= sensor_stream_averaged;
          sensor_display <= '0;
          zeroing        <= 1'b0;
        end else begin
          sensor_display <= diff;
          display_ready  <= 1'b1;
        end
      end
    end
  end
endmodule
