// sensor_communicator: averages SWEEPS sweeps of the probe.
//
// A start_sensor_blip pulse starts a burst: the module pulses start_sample,
// waits for stream_ready from the decoder, adds each byte lane of the sweep
// to its own accumulator and requests the next sweep, SWEEPS times in all.
// After the last sweep each lane's sum is divided by SWEEPS (the top bits of
// the sum, SWEEPS being a power of two), the result is put on
// sensor_stream_averaged and ssa_ready is high for one clock.  The average
// is kept until the next burst.  Blips during a burst are ignored.
// Averaging each depth lane on its own is this design's reading of the
// document's "sum of eight 56-bit measurements"; running sums replace the
// eight stored sweeps of the document with the same result.
module sensor_communicator
  import soil_pkg::*;
#(
  parameter int SWEEPS = 8
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                start_sensor_blip,
  input  logic                stream_ready,
  input  logic [STREAM_W-1:0] sensor_stream_raw,
  output logic                start_sample,
  output logic [STREAM_W-1:0] sensor_stream_averaged,
  output logic                ssa_ready
);
  localparam int SHIFT = $clog2(SWEEPS);
  localparam int SUM_W = SAMPLE_W + SHIFT;

  logic                        busy;
  logic [$clog2(SWEEPS+1)-1:0] count;   // sweeps received
  logic [SUM_W-1:0]            sum  [DEPTHS];
  logic [SUM_W-1:0]            next [DEPTHS];

  always_comb
    for (int d = 0; d < DEPTHS; d++)
      next[d] = sum[d] + SUM_W'(sensor_stream_raw[d*SAMPLE_W +: SAMPLE_W]);

  always_ff @(posedge clk) begin
    if (reset) begin
      busy                   <= 1'b0;
      count                  <= '0;
      start_sample           <= 1'b0;
      ssa_ready              <= 1'b0;
      sensor_stream_averaged <= '0;
      for (int d = 0; d < DEPTHS; d++) sum[d] <= '0;
    end else begin
      start_sample <= 1'b0;
      ssa_ready    <= 1'b0;
      if (!busy) begin
        if (start_sensor_blip) begin
          busy         <= 1'b1;
          count        <= '0;
          start_sample <= 1'b1;
          for (int d = 0; d < DEPTHS; d++) sum[d] <= '0;
        end
      end else if (stream_ready) begin
        for (int d = 0; d < DEPTHS; d++) sum[d] <= next[d];
        if (count == ($bits(count))'(SWEEPS - 1)) begin
          busy      <= 1'b0;
          ssa_ready <= 1'b1;
          for (int d = 0; d < DEPTHS; d++)
            sensor_stream_averaged[d*SAMPLE_W +: SAMPLE_W] <= next[d][SUM_W-1 -: SAMPLE_W];
        end else begin
          count        <= count + 1'b1;
          start_sample <= 1'b1;
        end
      end
    end
  end
endmodule
