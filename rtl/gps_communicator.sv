// gps_communicator: parser for the NMEA $GPRMC sentence.
//
// Each received byte (data_ready with data_in) moves the parser one step.
// In GPS_IDLE it waits for '$', then checks the header letters G, P, R, M, C
// and the comma after them; any other character sends it back to idle.
// After the header each comma moves it to the next field of the sentence:
//   1 time hhmmss, 2 status (A = valid fix), 3 latitude ddmm.mmmm,
//   4 N/S, 5 longitude dddmm.mmmm, 6 E/W, 7 speed, 8 course,
//   9 date ddmmyy, 10 magnetic variation, 11 its E/W.
// Digits of time, date, degrees and whole minutes are shifted into BCD
// registers (fractions of a minute are skipped); lat and lon also give the
// whole minutes in binary (0..59), as on the document's 6-bit outputs.
// The fields are collected in working registers and published together
// when the sentence ends ('*', carriage return or line feed after field 11):
// info is updated and pos_ready is high for one clock.  A '$' in mid
// sentence restarts the header, and a sentence cut short by '*' is dropped.
// gpsstate is the parser state (soil_pkg::gps_state_t) for status display.
// The state list and the header check follow the document; field order is
// that of the NMEA 0183 RMC sentence, and latching the whole sentence at its
// end is this design's choice.
module gps_communicator
  import soil_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       data_ready,
  input  logic [7:0] data_in,
  output gps_state_t gpsstate,
  output logic [5:0] lat,
  output logic [5:0] lon,
  output logic       fix,
  output logic       pos_ready,
  output gps_info_t  info
);
  gps_info_t  work;
  logic [5:0] lat_bin, lon_bin;
  logic [2:0] ndig;                 // digits taken in the current field
  logic       is_digit;
  logic [3:0] digit;

  assign is_digit = (data_in >= 8'h30) && (data_in <= 8'h39);
  assign digit    = data_in[3:0];

  // Next state on a comma, by field.
  function automatic gps_state_t after_comma(gps_state_t s);
    case (s)
      GPS_HDR_END: return GPS_TIME;
      GPS_TIME:    return GPS_VA;
      GPS_VA:      return GPS_LATDEG;
      GPS_LATDEG, GPS_LATMIN:   return GPS_NS;
      GPS_NS:      return GPS_LONGDEG;
      GPS_LONGDEG, GPS_LONGMIN: return GPS_EW;
      GPS_EW:      return GPS_SPEED;
      GPS_SPEED:   return GPS_CGOOD;
      GPS_CGOOD:   return GPS_FIXDATE;
      GPS_FIXDATE: return GPS_MAGVAR;
      GPS_MAGVAR:  return GPS_EW2;
      default:     return GPS_IDLE;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      gpsstate  <= GPS_IDLE;
      work      <= '0;
      info      <= '0;
      lat       <= '0;
      lon       <= '0;
      lat_bin   <= '0;
      lon_bin  <= '0;
      fix       <= 1'b0;
      pos_ready <= 1'b0;
      ndig      <= '0;
    end else begin
      pos_ready <= 1'b0;
      if (data_ready) begin
        if (data_in == "$") begin
          gpsstate <= GPS_HEADER1;
        end else if (gpsstate == GPS_EW2 &&
                     (data_in == "*" || data_in == 8'h0D || data_in == 8'h0A)) begin
          info      <= work;
          lat       <= lat_bin;
          lon       <= lon_bin;
          fix       <= work.fix;
          pos_ready <= 1'b1;
          gpsstate  <= GPS_IDLE;
        end else if (data_in == "*") begin
          gpsstate <= GPS_IDLE;
        end else if (data_in == "," && gpsstate > GPS_HEADER5) begin
          gpsstate <= after_comma(gpsstate);
          ndig     <= '0;
          if (gpsstate == GPS_HDR_END) begin
            work     <= '0;
            lat_bin  <= '0;
            lon_bin <= '0;
          end
        end else begin
          unique case (gpsstate)
            GPS_IDLE:    ;
            GPS_HEADER1: gpsstate <= (data_in == "G") ? GPS_HEADER2 : GPS_IDLE;
            GPS_HEADER2: gpsstate <= (data_in == "P") ? GPS_HEADER3 : GPS_IDLE;
            GPS_HEADER3: gpsstate <= (data_in == "R") ? GPS_HEADER4 : GPS_IDLE;
            GPS_HEADER4: gpsstate <= (data_in == "M") ? GPS_HEADER5 : GPS_IDLE;
            GPS_HEADER5: gpsstate <= (data_in == "C") ? GPS_HDR_END : GPS_IDLE;
            GPS_HDR_END: gpsstate <= GPS_IDLE;
            GPS_TIME:
              if (is_digit && ndig < 3'd6) begin
                work.time_bcd <= {work.time_bcd[19:0], digit};
                ndig <= ndig + 1'b1;
              end
            GPS_VA: work.fix <= (data_in == "A");
            GPS_LATDEG:
              if (is_digit) begin
                work.lat_deg_bcd <= {work.lat_deg_bcd[3:0], digit};
                if (ndig == 3'd1) begin
                  ndig     <= '0;
                  gpsstate <= GPS_LATMIN;
                end else ndig <= ndig + 1'b1;
              end
            GPS_LATMIN:
              if (is_digit && ndig < 3'd2) begin
                work.lat_min_bcd <= {work.lat_min_bcd[3:0], digit};
                lat_bin <= 6'(lat_bin * 10 + 6'(digit));
                ndig    <= ndig + 1'b1;
              end
            GPS_NS: work.lat_south <= (data_in == "S");
            GPS_LONGDEG:
              if (is_digit) begin
                work.lon_deg_bcd <= {work.lon_deg_bcd[7:0], digit};
                if (ndig == 3'd2) begin
                  ndig     <= '0;
                  gpsstate <= GPS_LONGMIN;
                end else ndig <= ndig + 1'b1;
              end
            GPS_LONGMIN:
              if (is_digit && ndig < 3'd2) begin
                work.lon_min_bcd <= {work.lon_min_bcd[3:0], digit};
                lon_bin <= 6'(lon_bin * 10 + 6'(digit));
                ndig     <= ndig + 1'b1;
              end
            GPS_EW: work.lon_west <= (data_in == "W");
            GPS_FIXDATE:
              if (is_digit && ndig < 3'd6) begin
                work.date_bcd <= {work.date_bcd[19:0], digit};
                ndig <= ndig + 1'b1;
              end
            GPS_SPEED, GPS_CGOOD, GPS_MAGVAR, GPS_EW2: ;
            default: gpsstate <= GPS_IDLE;
          endcase
        end
      end
    end
  end
endmodule
