// gps_communicator_tb: feeds sentences byte by byte and checks the parsed
// record: time, fix, latitude and longitude degrees, whole minutes (BCD and
// binary) and hemispheres, date; that other sentences ($GPGGA) and a
// sentence cut short are ignored; that a '$' inside a sentence restarts the
// parse; one pos_ready per good sentence; and the parser states seen.
//
// Checks accepted $GPRMC fields, ignored sentences and aborted headers.
module gps_communicator_tb;
  import soil_pkg::*;
  logic clk = 0, reset = 1, data_ready = 0;
  logic [7:0] data_in = 0;
  gps_state_t gpsstate;
  logic [5:0] lat, lon;
  logic fix, pos_ready;
  gps_info_t info;
  int checks = 0, failures = 0;

  gps_communicator dut (.clk, .reset, .data_ready, .data_in, .gpsstate,
                        .lat, .lon, .fix, .pos_ready, .info);
  always #20 clk = ~clk;

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0h expected %0h", $time, what, got, exp);
    end
  endtask

  int n_pos;
  int seen [32];
  always @(posedge clk) if (!reset) begin
    if (pos_ready) n_pos++;
    seen[int'(gpsstate)]++;
  end

  task automatic send(string s);
    for (int i = 0; i < s.len(); i++) begin
      @(negedge clk) begin data_in = s[i]; data_ready = 1; end
      @(negedge clk) data_ready = 0;
      repeat (3) @(negedge clk);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    send("$GPRMC,123519,A,4807.038,N,01131.000,E,022.4,084.4,230394,003.1,W*6A\r\n");
    check(n_pos, 1, "sentence accepted");
    check(info.time_bcd, 24'h123519, "time");
    check(info.date_bcd, 24'h230394, "date");
    check(info.lat_deg_bcd, 8'h48, "latitude degrees");
    check(info.lat_min_bcd, 8'h07, "latitude minutes");
    check(info.lat_south, 0, "north");
    check(info.lon_deg_bcd, 12'h011, "longitude degrees");
    check(info.lon_min_bcd, 8'h31, "longitude minutes");
    check(info.lon_west, 0, "east");
    check(info.fix, 1, "fix in record");
    check(fix, 1, "fix");
    check(lat, 7, "lat binary minutes");
    check(lon, 31, "lon binary minutes");
    // other sentence type and a truncated RMC: no update
    send("$GPGGA,000001,3000.000,S,09000.000,W,1,05,1.5,10.0,M,,M,,*47\r\n");
    send("$GPRMC,000002,V,3000.00,S,09059.0*11\r\n");
    check(n_pos, 1, "other sentences ignored");
    check(info.time_bcd, 24'h123519, "time kept");
    // restart inside a sentence, southern and western hemispheres, no fix
    send("$GPRMC,0000$GPRMC,235959,V,3359.99,S,11805.50,W,0.0,0.0,311299,,*1C\r\n");
    check(n_pos, 2, "second sentence accepted");
    check(info.time_bcd, 24'h235959, "time 2");
    check(info.date_bcd, 24'h311299, "date 2");
    check(info.lat_deg_bcd, 8'h33, "latitude degrees 2");
    check(info.lat_min_bcd, 8'h59, "latitude minutes 2");
    check(info.lat_south, 1, "south");
    check(info.lon_deg_bcd, 12'h118, "longitude degrees 2");
    check(info.lon_min_bcd, 8'h05, "longitude minutes 2");
    check(info.lon_west, 1, "west");
    check(fix, 0, "no fix");
    check(lat, 59, "lat binary 2");
    check(lon, 5, "lon binary 2");
    check(gpsstate, GPS_IDLE, "idle after sentence");
    for (int s = 0; s <= 19; s++) check(int'(seen[s] > 0), 1, $sformatf("state %0d visited", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
