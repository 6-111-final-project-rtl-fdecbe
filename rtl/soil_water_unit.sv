// soil_water_unit: controller of the portable soil-water characterization
// unit.
//
// A resistive probe is pushed into the soil; analog switches put a voltage
// across one of its seven pad pairs at a time and an 8-bit ADC reads the
// resulting divider voltage, which falls as the soil gets wetter.  This
// controller sequences the switches and the ADC (sensor_module), averages
// eight sweeps of the probe, subtracts a dry-soil zero taken with the zero
// button, stores each result with the GPS position, date and time under one
// of 32 sample numbers (sample_store), and draws everything on a 640x480
// interlaced LCD (video_module).  The GPS position comes from $GPRMC
// sentences on a 4800 bit/s serial line (gps_module).
//
// Clock: clk is the 25 MHz system clock (on the original board a clock
// manager halves the 50 MHz oscillator; here the 25 MHz clock is an input).
// Reset: held for 16 clocks after power-up and while button 3 is pressed.
// Buttons (active high, asynchronous): btn[0] zero, btn[1] sample,
// btn[2] next sample, btn[3] reset.  gps_rx_n is the GPS line as wired to
// the board, inverted (idle low); adc_intr is the ADC's active-low INTR.
// While reset is active the ADC strobes are held high and the switches
// open.  LEDs: 7 reset, 6 sample button, 5 zero button, 4..1 parser in
// states 16, 8, 2, 1, 0 GPS line activity.
//
// Origin: the module split, button roles and the 16-clock reset follow the
// original top level; the clock comes in at 25 MHz (the clock manager is
// vendor IP), and the record store, LED map and 3-bit colour are this
// design's choices.
module soil_water_unit
  import soil_pkg::*;
#(
  parameter int SENSOR_CLOCKS_PER_SAMPLE = 500,
  parameter int GPS_CLOCKS_PER_BIT       = 5207,
  parameter int SWEEPS                   = 8,
  parameter int NUM_SAMPLES              = 32
) (
  input  logic                clk,
  input  logic [3:0]          btn,
  input  logic                sw_vertical,
  input  logic                gps_rx_n,
  input  logic [SAMPLE_W-1:0] adc_db,
  input  logic                adc_intr,
  output logic                adc_cs_n,
  output logic                adc_wr_n,
  output logic                adc_rd_n,
  output logic [SEL_W-1:0]    sensor_sel,
  output logic [2:0]          lcd_rgb,
  output logic                lcd_csync,
  output logic                lcd_hsync,
  output logic                lcd_vsync,
  output logic [7:0]          led
);
  logic reset, reset_button;
  logic zero_request, start_sensor, next_sample;

  synchronize u_sync_reset (.clk, .in(btn[3]), .out(reset_button));
  synchronize u_sync_zero  (.clk, .in(btn[0]), .out(zero_request));
  synchronize u_sync_start (.clk, .in(btn[1]), .out(start_sensor));
  synchronize u_sync_next  (.clk, .in(btn[2]), .out(next_sample));

  reset_gen u_reset (.clk, .reset_button, .reset);

  // ---- GPS -------------------------------------------------------------
  logic       gps_data, gps_ready, gps_fix;
  logic [5:0] gps_x, gps_y;
  gps_state_t gpsstate;
  gps_info_t  gps_info;

  assign gps_data = reset ? 1'b1 : ~gps_rx_n;

  gps_module #(.CLOCKS_PER_BIT(GPS_CLOCKS_PER_BIT)) u_gps (
    .clk, .reset, .data(gps_data), .x(gps_x), .y(gps_y),
    .data_ready(gps_ready), .fix(gps_fix), .gpsstate, .info(gps_info)
  );

  // ---- sensor ----------------------------------------------------------
  logic                cs, wr, rd, intr;
  logic [SEL_W-1:0]    sel;
  logic [SAMPLE_W-1:0] sensor_data;
  logic                sensor_ready, initiate, start_sensor_blip;
  logic [STREAM_W-1:0] sensor_display, zero_offset;
  logic                ssa_ready, display_ready;

  assign intr = reset ? 1'b1 : adc_intr;

  sensor_module #(.CLOCKS_PER_SAMPLE(SENSOR_CLOCKS_PER_SAMPLE), .SWEEPS(SWEEPS)) u_sensor (
    .clk, .reset, .zero_request, .start_sensor, .sensor_in(adc_db), .intr,
    .cs, .wr, .rd, .sensor_sel(sel), .sensor_data, .sensor_ready, .initiate,
    .start_sensor_blip, .sensor_display, .zero_offset, .ssa_ready, .display_ready
  );

  assign adc_cs_n   = reset | cs;
  assign adc_wr_n   = reset | wr;
  assign adc_rd_n   = reset | rd;
  assign sensor_sel = reset ? '0 : sel;

  // ---- sample records --------------------------------------------------
  logic [$clog2(NUM_SAMPLES)-1:0] sample_num;
  logic                           stored;
  logic [STREAM_W-1:0]            shown_meas;
  gps_info_t                      shown_info;

  sample_store #(.NUM_SAMPLES(NUM_SAMPLES)) u_store (
    .clk, .reset, .next_sample, .meas_ready(display_ready),
    .measurement(sensor_display), .live_info(gps_info),
    .sample_num, .stored, .shown_meas, .shown_info
  );

  // ---- display ---------------------------------------------------------
  logic [9:0] hcount, vcount;
  logic       vreset;

  video_module u_video (
    .clk, .reset, .vertical(sw_vertical), .sensor_display(shown_meas),
    .info(shown_info), .gpsstate, .sample_num(5'(sample_num)), .sample_stored(stored),
    .zero_set(zero_offset != '0), .rgb(lcd_rgb), .hsync(lcd_hsync),
    .vsync(lcd_vsync), .csync(lcd_csync), .hcount, .vcount, .vreset
  );

  assign led = {reset, start_sensor, zero_request,
                gpsstate == GPS_FIXDATE, gpsstate == GPS_LATDEG,
                gpsstate == GPS_HEADER2, gpsstate == GPS_HEADER1,
                ~gps_data};
endmodule
