// video_module_tb: captures whole frames from the video output and checks
// them: bar heights from the measurement, the teal frame, the date, time
// and sample lines drawn with the right characters (compared with glyphs
// read from the font table), the number of red GPS arrows for two parser
// states, and the composite sync.  A pixel is captured on the second clock
// of its pixel time, when the registered colour belongs to that position.
//
// Captures whole frames and compares text, arrows and bars with expectations.
module video_module_tb;
  import soil_pkg::*;
  logic clk = 0, reset = 1;
  logic [55:0] sd = 56'h20_30_40_50_60_70_64;   // lane 0 = 100
  gps_info_t info;
  gps_state_t gpsstate = GPS_IDLE;
  logic [2:0] rgb;
  logic hsync, vsync, csync, vreset;
  logic [9:0] hcount, vcount;
  logic [7:0] font [1536];
  logic [2:0] frame [480][640];
  int checks = 0, failures = 0, csync_err = 0;

  video_module dut (.clk, .reset, .vertical(1'b0), .sensor_display(sd), .info, .gpsstate,
                    .sample_num(5'd4), .sample_stored(1'b1), .zero_set(1'b0),
                    .rgb, .hsync, .vsync, .csync, .hcount, .vcount, .vreset);
  always #20 clk = ~clk;

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // capture, sampled between clock edges: rgb now holds the colour of the
  // position of one clock ago (text of two clocks ago)
  logic [9:0] h1 = 0, v1 = 0, h2 = 0, v2 = 0;
  always @(negedge clk) begin
    if (!reset && h1 == h2 && v1 == v2 && h1 < 640 && v1 < 480) frame[v1][h1] = rgb;
    if (!reset && csync !== (hsync & vsync) && $time > 1000) csync_err++;
    h2 = h1; v2 = v1; h1 = hcount; v1 = vcount;
  end

  // expected text colour at (x,y) for a string box, or -1 outside it
  function automatic int text_at(int x, int y, string s, int cx, int cy, int fg, int bg);
    int dx, dy;
    logic [7:0] row;
    dx = x - cx - 1; dy = y - cy;
    if (dx < 0 || dx >= 16 * s.len() || dy < 0 || dy >= 24) return -1;
    row = font[int'(s[dx / 16]) * 12 + dy / 2];
    return row[7 - (dx % 16) / 2] ? fg : bg;
  endfunction

  task automatic compare_text(string s, int cx, int cy, int x0, int x1, int y0, int y1);
    int bad = 0;
    for (int y = y0; y <= y1; y++)
      for (int x = x0; x <= x1; x++)
        if (int'(frame[y][x]) != text_at(x, y, s, cx, cy, 0, 7)) bad++;
    check(bad, 0, {"pixels differing in \"", s, "\""});
  endtask

  function automatic int count_colour(int x0, int x1, int y0, int y1, int c);
    int n = 0;
    for (int y = y0; y <= y1; y++)
      for (int x = x0; x <= x1; x++)
        if (int'(frame[y][x]) == c) n++;
    return n;
  endfunction

  task automatic one_frame();
    wait (vreset);              // end of even field
    wait (!vreset);
    wait (vreset);              // a full frame later
    @(posedge clk);
  endtask

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    $readmemh("rtl/font_rom.hex", font);
    info = '{time_bcd: 24'h123519, date_bcd: 24'h230394, lat_deg_bcd: 8'h48,
             lat_min_bcd: 8'h07, lat_south: 1'b0, lon_deg_bcd: 12'h011,
             lon_min_bcd: 8'h31, lon_west: 1'b1, fix: 1'b1};
    repeat (3) @(negedge clk);
    reset = 0;
    one_frame();
    // bars: lane k has top at line 474 - value
    for (int k = 0; k < 7; k++) begin
      automatic int top = 474 - int'(sd[k*8 +: 8]);
      check(frame[top][k * 90 + 45], 4, $sformatf("bar %0d top", k));
      check(frame[top - 1][k * 90 + 45], 7, $sformatf("above bar %0d", k));
    end
    check(frame[1][600], 6, "teal frame line");
    check(frame[300][700 - 100], 7, "results area");
    compare_text("Date:     23/03/94  ", 0, 64, 1, 320, 65, 87);
    compare_text("Time:     12:35:19  ", 0, 94, 1, 320, 94, 117);
    compare_text("Sample:  05 Stored", 325, 138, 326, 612, 138, 161);
    compare_text("Longitude:011 31' W ", 0, 152, 1, 320, 152, 175);
    check(count_colour(453, 612, 64, 87, 1), 2 * 28, "red pixels of 2 arrows");
    gpsstate = GPS_LATDEG;
    one_frame();
    check(count_colour(453, 612, 64, 87, 1), 8 * 28, "red pixels of 8 arrows");
    check(csync_err, 0, "composite sync");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
