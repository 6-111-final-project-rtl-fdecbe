// video_module: draws the user interface on the 640x480 interlaced LCD.
//
// vga_module produces the pixel position and the sync pulses.  For every
// position rectangle_generation gives the frame, the panels and the bar
// graph, and fourteen char_string_display instances give the text: the
// title, the "Location" box (date, time, latitude, longitude of the shown
// record), the "Settings" box (GPS activity arrows, zero status, active
// sample number and whether it holds a stored record) and the "Results"
// heading.  Every source outputs 0 where it draws nothing, so the colour is
// the OR of all of them.  The colour and the syncs are registered once;
// lcd composite sync is the AND of the active-low hsync and vsync.
// Text positions, colours and the labels follow the document's screen; the
// text of the value fields (dd/mm/yy, hh:mm:ss, degrees and minutes) and of
// the zero and sample status is this design's.
module video_module
  import soil_pkg::*;
(
  input  logic                clk,
  input  logic                reset,
  input  logic                vertical,
  input  logic [STREAM_W-1:0] sensor_display,
  input  gps_info_t           info,
  input  gps_state_t          gpsstate,
  input  logic [4:0]          sample_num,
  input  logic                sample_stored,
  input  logic                zero_set,
  output logic [2:0]          rgb,
  output logic                hsync,
  output logic                vsync,
  output logic                csync,
  output logic [9:0]          hcount,
  output logic [9:0]          vcount,
  output logic                vreset
);
  logic       hs, vs;
  logic [2:0] rect_pixel;

  vga_module u_vga (
    .clk, .reset, .vertical, .hsync(hs), .vsync(vs),
    .hcount, .vcount, .vreset
  );

  rectangle_generation u_rect (
    .sensor_display, .hcount, .vcount, .pixel(rect_pixel)
  );

  // ---- text contents -------------------------------------------------
  function automatic logic [7:0] dig(logic [3:0] d);
    return 8'h30 + 8'(d);
  endfunction

  logic [20*8-1:0] s_date, s_time, s_lat, s_lon;
  logic [10*8-1:0] s_arrows;
  logic [18*8-1:0] s_zero, s_sample;
  logic [5:0]      shown;

  always_comb begin
    s_date = {"Date:     ", dig(info.date_bcd[23:20]), dig(info.date_bcd[19:16]), "/",
              dig(info.date_bcd[15:12]), dig(info.date_bcd[11:8]), "/",
              dig(info.date_bcd[7:4]), dig(info.date_bcd[3:0]), "  "};
    s_time = {"Time:     ", dig(info.time_bcd[23:20]), dig(info.time_bcd[19:16]), ":",
              dig(info.time_bcd[15:12]), dig(info.time_bcd[11:8]), ":",
              dig(info.time_bcd[7:4]), dig(info.time_bcd[3:0]), "  "};
    s_lat  = {"Latitude: ", dig(info.lat_deg_bcd[7:4]), dig(info.lat_deg_bcd[3:0]), " ",
              dig(info.lat_min_bcd[7:4]), dig(info.lat_min_bcd[3:0]), "' ",
              info.lat_south ? "S" : "N", "  "};
    s_lon  = {"Longitude:", dig(info.lon_deg_bcd[11:8]), dig(info.lon_deg_bcd[7:4]),
              dig(info.lon_deg_bcd[3:0]), " ",
              dig(info.lon_min_bcd[7:4]), dig(info.lon_min_bcd[3:0]), "' ",
              info.lon_west ? "W" : "E", " "};
    unique case (gps_activity(gpsstate))
      2'd0: s_arrows = ">>        ";
      2'd1: s_arrows = ">>>>      ";
      2'd2: s_arrows = ">>>>>>    ";
      default: s_arrows = ">>>>>>>>  ";
    endcase
    s_zero = zero_set ? "Zero:    Set      " : "Zero:    Insert 0 ";
    shown  = 6'(sample_num) + 6'd1;
    s_sample = {"Sample:  ", dig(4'(shown / 10)), dig(4'(shown % 10)),
                sample_stored ? " Stored" : " Empty "};
  end

  // ---- text displays -------------------------------------------------
  localparam int NTEXT = 14;
  logic [2:0] text_pixel [NTEXT];

  char_string_display #(.NCHAR(25), .COLOR(3'd0), .BG_COLOR(3'd6)) u_title (
    .vclock(clk), .hcount, .vcount, .pixel(text_pixel[0]),
    .cstring("   Soil-Water  Unit      "), .cx(10'd112), .cy(10'd2));
  char_string_display #(.NCHAR(8), .COLOR(3'd0), .BG_COLOR(3'd6)) u_loc (
    .vclock(clk), .hcount, .vcount, .pixel(text_pixel[1]),
    .cstring("Location"), .cx(10'd0), .cy(10'd28));
  char_string_display #(.NCHAR(12), .COLOR(3'd7), .BG_COLOR(3'd7)) u_loc_pad (
    .vclock(clk), .hcount, .vcount, .pixel(text_pixel[2]),
    .cstring({12{" "}}), .cx(10'd128), .cy(10'd28));
  char_string_display #(.NCHAR(20), .COLOR(3'd0), .BG_COLOR(3'd7)) u_date (
    .vclock(clk), .hcount, .vcount, .pixel(text_pixel[3]),
    .cstring(s_date), .cx(10'd0), .cy(10'd64));
  char_string_display #(.NCHAR(20), .COLOR(3'd0), .BG_COLOR(3'd7)) u_time (
    .vclock(clk), .hcount, .vcount, .pixel(text_pixel[4]),
    .cstring(s_time), .cx(10'd0), .cy(10'd94));
  char_string_display #(.NCHAR(20), .COLOR(3'd0), .BG_COLOR(3'd7)) u_lat (
    .vclock(clk), .hcount, .vcount, .pixel(text_pixel[5]),
    .cstring(s_lat), .cx(10'd0), .cy(10'd124));
  char_string_display #(.NCHAR(20), .COLOR(3'd0), .BG_COLOR(3'd7)) u_lon (
    .vclock(clk), .hcount, .vcount, .pixel(text_pixel[6]),
    .cstring(s_lon), .cx(10'd0), .cy(10'd152));
  char_string_display #(.NCHAR(8), .COLOR(3'd0), .BG_COLOR(3'd6)) u_set (
    .vclock(clk), .hcount, .vcount, .pixel(text_pixel[7]),
    .cstring("Settings"), .cx(10'd325), .cy(10'd28));
  char_string_display #(.NCHAR(12), .COLOR(3'd7), .BG_COLOR(3'd7)) u_set_pad (
    .vclock(clk), .hcount, .vcount, .pixel(text_pixel[8]),
    .cstring({12{" "}}), .cx(10'd453), .cy(10'd28));
  char_string_display #(.NCHAR(10), .COLOR(3'd1), .BG_COLOR(3'd7)) u_arrows (
    .vclock(clk), .hcount, .vcount, .pixel(text_pixel[9]),
    .cstring(s_arrows), .cx(10'd452), .cy(10'd64));
  char_string_display #(.NCHAR(8), .COLOR(3'd0), .BG_COLOR(3'd7)) u_gps (
    .vclock(clk), .hcount, .vcount, .pixel(text_pixel[10]),
    .cstring("GPS Com:"), .cx(10'd325), .cy(10'd64));
  char_string_display #(.NCHAR(18), .COLOR(3'd0), .BG_COLOR(3'd7)) u_zero (
    .vclock(clk), .hcount, .vcount, .pixel(text_pixel[11]),
    .cstring(s_zero), .cx(10'd325), .cy(10'd94));
  char_string_display #(.NCHAR(18), .COLOR(3'd0), .BG_COLOR(3'd7)) u_sample (
    .vclock(clk), .hcount, .vcount, .pixel(text_pixel[12]),
    .cstring(s_sample), .cx(10'd325), .cy(10'd138));
  char_string_display #(.NCHAR(7), .COLOR(3'd0), .BG_COLOR(3'd6)) u_results (
    .vclock(clk), .hcount, .vcount, .pixel(text_pixel[13]),
    .cstring("Results"), .cx(10'd0), .cy(10'd196));

  logic [2:0] mixed;
  always_comb begin
    mixed = rect_pixel;
    for (int i = 0; i < NTEXT; i++) mixed |= text_pixel[i];
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      rgb   <= '0;
      hsync <= 1'b1;
      vsync <= 1'b1;
      csync <= 1'b1;
    end else begin
      rgb   <= mixed;
      hsync <= hs;
      vsync <= vs;
      csync <= hs & vs;
    end
  end
endmodule
