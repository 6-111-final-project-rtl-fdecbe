// gps_module: GPS receiver front end, from serial line to position record.
//
// gps_clock, gps_decoder and gps_communicator in a chain: the decoder turns
// the 4800 bit/s line into bytes, the communicator parses $GPRMC sentences.
// When a sentence has been parsed the module copies its result: x and y
// take the whole minutes of latitude and longitude, fix the receiver's fix
// status and info the full record (time, date, latitude, longitude); then
// data_ready is high for one clock.  gpsstate shows the parser's progress
// for the status display.  data is the line at logic level, idle high.
// Latching on the sentence-end pulse (rather than on its falling edge, as
// the document does) keeps the module on a single clock.
module gps_module
  import soil_pkg::*;
#(
  parameter int CLOCKS_PER_BIT = 5207
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       data,
  output logic [5:0] x,
  output logic [5:0] y,
  output logic       data_ready,
  output logic       fix,
  output gps_state_t gpsstate,
  output gps_info_t  info
);
  logic       counting, enable, byte_ready, pos_ready, fix_gps;
  logic [7:0] ascii_byte;
  logic [5:0] lat, lon;
  gps_info_t  info_gps;

  gps_clock #(.CLOCKS_PER_BIT(CLOCKS_PER_BIT)) u_clock (
    .clk, .reset, .counting, .enable
  );

  gps_decoder u_decoder (
    .clk, .reset, .enable, .data, .counting,
    .data_ready(byte_ready), .data_out(ascii_byte)
  );

  gps_communicator u_communicator (
    .clk, .reset, .data_ready(byte_ready), .data_in(ascii_byte),
    .gpsstate, .lat, .lon, .fix(fix_gps), .pos_ready, .info(info_gps)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      x          <= '0;
      y          <= '0;
      fix        <= 1'b0;
      info       <= '0;
      data_ready <= 1'b0;
    end else begin
      data_ready <= pos_ready;
      if (pos_ready) begin
        x    <= lat;
        y    <= lon;
        fix  <= fix_gps;
        info <= info_gps;
      end
    end
  end
endmodule
