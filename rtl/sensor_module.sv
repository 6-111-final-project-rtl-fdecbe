// sensor_module: measures the soil at DEPTHS depths on request.
//
// The synchronised sample button (start_sensor) and zero button
// (zero_request) are turned into one-clock pulses on the press.  A zero
// press also starts a measurement, one clock later, so both buttons run the
// same burst: sensor_communicator asks sensor_decoder for 8 sweeps, each
// sweep steps the analog switches through the 7 pad pairs and
// sensor_control runs one ADC cycle per pad pair, paced by the 50 kHz
// sensor_clock.  sensor_config then either stores the averaged sweep as the
// zero or shows it, minus the zero, on sensor_display.  ssa_ready pulses
// when an averaged sweep is ready; display_ready pulses one clock later when
// sensor_display has been updated by a measurement.  The ADC strobes cs, wr
// and rd are active low, intr is the ADC's active-low INTR.
//
// At the defaults one ADC cycle takes 7 enable periods plus the conversion
// (about 150 us), so a burst of 8 x 7 readings takes about 8 ms.
//
// Origin: the split into clock, control, decoder, communicator and
// configuration follows the original report; display_ready and the exposed
// debug outputs are additions of this design.
module sensor_module
  import soil_pkg::*;
#(
  parameter int CLOCKS_PER_SAMPLE = 500,
  parameter int SWEEPS            = 8
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                zero_request,
  input  logic                start_sensor,
  input  logic [SAMPLE_W-1:0] sensor_in,
  input  logic                intr,
  output logic                cs,
  output logic                wr,
  output logic                rd,
  output logic [SEL_W-1:0]    sensor_sel,
  output logic [SAMPLE_W-1:0] sensor_data,
  output logic                sensor_ready,
  output logic                initiate,
  output logic                start_sensor_blip,
  output logic [STREAM_W-1:0] sensor_display,
  output logic [STREAM_W-1:0] zero_offset,
  output logic                ssa_ready,
  output logic                display_ready
);
  logic                enable, active, stream_ready, start_sample;
  logic [STREAM_W-1:0] stream_raw, stream_avg;
  logic                start_q, zero_q, update_zero;

  // Press detection: pulse on the first clock the button is seen high.
  always_ff @(posedge clk) begin
    if (reset) begin
      start_q           <= 1'b1;
      zero_q            <= 1'b1;
      update_zero       <= 1'b0;
      start_sensor_blip <= 1'b0;
    end else begin
      start_q           <= start_sensor;
      zero_q            <= zero_request;
      update_zero       <= zero_request & ~zero_q;
      start_sensor_blip <= (start_sensor & ~start_q) | update_zero;
    end
  end

  sensor_clock #(.CLOCKS_PER_SAMPLE(CLOCKS_PER_SAMPLE)) u_clock (
    .clk, .reset, .active, .enable
  );

  sensor_control u_control (
    .clk, .reset, .enable, .initiate, .intr, .sensor_in,
    .cs, .wr, .rd, .active, .sensor_ready, .sensor_data
  );

  sensor_decoder u_decoder (
    .clk, .reset, .start_sample, .sensor_ready, .sensor_data,
    .initiate, .stream_ready, .sensor_sel, .sensor_stream_raw(stream_raw)
  );

  sensor_communicator #(.SWEEPS(SWEEPS)) u_communicator (
    .clk, .reset, .start_sensor_blip, .stream_ready,
    .sensor_stream_raw(stream_raw), .start_sample,
    .sensor_stream_averaged(stream_avg), .ssa_ready
  );

  sensor_config u_config (
    .clk, .reset, .update_zero, .sensor_stream_averaged(stream_avg),
    .ssa_ready, .zero_offset, .sensor_display, .display_ready
  );
endmodule
