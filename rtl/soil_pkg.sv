// soil_pkg: types and constants shared by the soil-water controller.
//
// The probe is read at DEPTHS pad pairs, one 8-bit ADC code per depth, and a
// full sweep is packed into a STREAM_W-bit word with depth 0 in bits [7:0].
// The GPS parser walks a $GPRMC sentence through the gps_state_t states; the
// numeric codes of the states are the ones the status LEDs decode.  The
// gps_info_t record holds the fields kept from one sentence as BCD digits so
// that the display can turn them into ASCII by adding 8'h30.
//
// Origin: widths (7 depths x 8 bits, 16 switch controls) follow the original
// report; the GPS state encoding and record layout are this design's own.
package soil_pkg;

  localparam int DEPTHS    = 7;            // pad pairs along the probe
  localparam int SAMPLE_W  = 8;            // one ADC code
  localparam int STREAM_W  = DEPTHS * SAMPLE_W;  // one sweep, 56 bits
  localparam int SEL_W     = 16;           // analog switch controls

  // Colours of the 3-bit pixel, bit 2 = blue, bit 1 = green, bit 0 = red.
  localparam logic [2:0] COL_BLACK = 3'b000;
  localparam logic [2:0] COL_RED   = 3'b001;
  localparam logic [2:0] COL_BAR   = 3'b100;
  localparam logic [2:0] COL_TEAL  = 3'b110;
  localparam logic [2:0] COL_WHITE = 3'b111;

  typedef enum logic [4:0] {
    GPS_IDLE     = 5'd0,
    GPS_HEADER1  = 5'd1,   // '$' seen, expecting 'G'
    GPS_HEADER2  = 5'd2,   // expecting 'P'
    GPS_HEADER3  = 5'd3,   // expecting 'R'
    GPS_HEADER4  = 5'd4,   // expecting 'M'
    GPS_HEADER5  = 5'd5,   // expecting 'C'
    GPS_TIME     = 5'd6,   // field 1, hhmmss
    GPS_VA       = 5'd7,   // field 2, A = valid fix, V = warning
    GPS_LATDEG   = 5'd8,   // field 3, degrees of latitude
    GPS_LATMIN   = 5'd9,   // field 3, minutes of latitude
    GPS_NS       = 5'd10,  // field 4
    GPS_LONGDEG  = 5'd11,  // field 5, degrees of longitude
    GPS_LONGMIN  = 5'd12,  // field 5, minutes of longitude
    GPS_EW       = 5'd13,  // field 6
    GPS_SPEED    = 5'd14,  // field 7
    GPS_CGOOD    = 5'd15,  // field 8, course over ground
    GPS_FIXDATE  = 5'd16,  // field 9, ddmmyy
    GPS_MAGVAR   = 5'd17,  // field 10
    GPS_EW2      = 5'd18,  // field 11, end of sentence
    GPS_HDR_END  = 5'd19   // "$GPRMC" seen, expecting ','
  } gps_state_t;

  typedef struct packed {
    logic [23:0] time_bcd;     // hh mm ss
    logic [23:0] date_bcd;     // dd mm yy
    logic [7:0]  lat_deg_bcd;  // dd
    logic [7:0]  lat_min_bcd;  // whole minutes
    logic        lat_south;
    logic [11:0] lon_deg_bcd;  // ddd
    logic [7:0]  lon_min_bcd;  // whole minutes
    logic        lon_west;
    logic        fix;          // receiver reported a valid fix
  } gps_info_t;

  // Activity level shown as red arrows in the settings box:
  // 0 idle, 1 receiving the header, 2 date/time fields, 3 position fields.
  function automatic logic [1:0] gps_activity(gps_state_t s);
    case (s)
      GPS_IDLE: return 2'd0;
      GPS_HEADER1, GPS_HEADER2, GPS_HEADER3, GPS_HEADER4, GPS_HEADER5,
      GPS_HDR_END: return 2'd1;
      GPS_LATDEG, GPS_LATMIN, GPS_NS, GPS_LONGDEG, GPS_LONGMIN, GPS_EW:
        return 2'd3;
      default: return 2'd2;
    endcase
  endfunction

  // Switch pattern for depth k: one switch of the low bank and one of the
  // high bank, bits k and k+9.
  function automatic logic [SEL_W-1:0] sel_pattern(int unsigned k);
    logic [SEL_W-1:0] p;
    p = '0;
    p[k]     = 1'b1;
    p[k + 9] = 1'b1;
    return p;
  endfunction

endpackage
