// gps_module_tb: a $GPRMC sentence at 4800 bit/s (5207 clocks per bit at
// 25 MHz, the defaults) on the serial line, preceded by a $GPGGA sentence.
// Checks x and y (whole minutes), fix, the record, one data_ready per RMC
// sentence, and that data_ready comes within one bit time of the end of
// the '*' byte.
//
// Runs at the default 5207 clocks per bit.
module gps_module_tb;
  import soil_pkg::*;
  localparam int CPB = 5207;
  logic clk = 0, reset = 1, line, line_n;
  logic [5:0] x, y;
  logic data_ready, fix;
  gps_state_t gpsstate;
  gps_info_t info;
  int checks = 0, failures = 0;

  uart_source #(.CLOCKS_PER_BIT(CPB)) src (.clk, .line, .line_n);
  gps_module dut (.clk, .reset, .data(line), .x, .y, .data_ready, .fix, .gpsstate, .info);
  always #20 clk = ~clk;

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0h expected %0h", $time, what, got, exp);
    end
  endtask

  int n_ready, cyc, t_ready;
  always @(posedge clk) begin
    cyc++;
    if (data_ready && !reset) begin n_ready++; t_ready = cyc; end
  end

  initial begin
    #400ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_end;
    repeat (3) @(negedge clk);
    reset = 0;
    src.idle(12);
    src.send_string("$GPGGA,1,2*00\r\n");
    src.send_string("$GPRMC,081500,A,4221.50,N,07105.25,W,0.0,0.0,150506,,*");
    t_end = cyc;
    src.send_string("1F\r\n");
    src.idle(2);
    check(n_ready, 1, "data_ready pulses");
    check(int'(t_ready > t_end - CPB / 2 && t_ready < t_end + CPB), 1, "update timing");
    check(x, 21, "x = latitude minutes");
    check(y, 5, "y = longitude minutes");
    check(fix, 1, "fix");
    check(info.time_bcd, 24'h081500, "time");
    check(info.date_bcd, 24'h150506, "date");
    check(info.lat_deg_bcd, 8'h42, "latitude degrees");
    check(info.lon_deg_bcd, 12'h071, "longitude degrees");
    check(info.lon_west, 1, "west");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
