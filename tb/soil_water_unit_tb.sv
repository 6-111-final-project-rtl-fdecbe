// soil_water_unit_tb: end-to-end run of the controller at its default
// parameters (25 MHz clock, 50 kHz sensor steps, 4800 bit/s GPS, 8 sweeps,
// 32 records).  The ADC model's input depends on the pad pair the switches
// select (a soil profile per depth) plus a ramp of 0..7 over the 8 sweeps.
//
// Scenario: power-up reset; a $GPGGA sentence (ignored) and a $GPRMC
// sentence (taken); zero over dry soil; a sample over wet soil stored as
// sample 1; next sample shows an empty number; a second sample; 31 presses
// of next sample wrap back to sample 1, which shows its stored record; a new
// sample replaces it; a reset press in the middle of a burst.  The LCD
// output is captured frame by frame and the bars and text are checked.
// Each mechanism is counted and one that never happens is a failure.
//
// All parameters of the top are at their defaults.
module soil_water_unit_tb;
  import soil_pkg::*;
  localparam int CPB = 5207;
  logic clk = 0;
  logic [3:0] btn = 0;
  logic gps_line, gps_rx_n;
  logic [7:0] adc_db, vin;
  logic adc_intr, adc_cs_n, adc_wr_n, adc_rd_n;
  logic [15:0] sensor_sel;
  logic [2:0] lcd_rgb;
  logic lcd_csync, lcd_hsync, lcd_vsync;
  logic [7:0] led;
  int conversions;
  int checks = 0, failures = 0;

  soil_water_unit dut (.clk, .btn, .sw_vertical(1'b0), .gps_rx_n, .adc_db, .adc_intr,
                       .adc_cs_n, .adc_wr_n, .adc_rd_n, .sensor_sel, .lcd_rgb,
                       .lcd_csync, .lcd_hsync, .lcd_vsync, .led);
  adc0841_model #(.CONV_CYCLES(1000)) adc (.clk, .cs_n(adc_cs_n), .wr_n(adc_wr_n),
                       .rd_n(adc_rd_n), .vin, .intr_n(adc_intr), .db(adc_db), .conversions);
  uart_source #(.CLOCKS_PER_BIT(CPB)) gps (.clk, .line(gps_line), .line_n(gps_rx_n));
  always #20 clk = ~clk;

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  // ---- soil -----------------------------------------------------------
  int base [7];
  always_comb begin
    int depth;
    depth = -1;
    for (int k = 0; k < 7; k++)
      if (sensor_sel == (16'(1) << k | 16'(1) << (k + 9))) depth = k;
    vin = (depth < 0) ? 8'h00 : 8'(base[depth] + (conversions / 7) % 8);
  end

  // ---- LCD capture (see video_module_tb) ------------------------------
  logic [2:0] frame [480][640];
  logic [9:0] h1 = 0, v1 = 0, h2 = 0, v2 = 0;
  always @(negedge clk) begin
    if (h1 == h2 && v1 == v2 && h1 < 640 && v1 < 480) frame[v1][h1] = lcd_rgb;
    h2 = h1; v2 = v1;
    h1 = dut.u_video.hcount; v1 = dut.u_video.vcount;
  end

  // ---- mechanism counters ---------------------------------------------
  int n_por_clocks, n_gps_update, n_hdr_abort, n_zero, n_meas, n_clamped, n_strobe_in_reset;
  int n_even_end, n_odd_end, n_wrap, n_recall, n_replace, n_empty_view, n_reset_mid_burst;
  logic [4:0] num_q = 0;
  always @(posedge clk) begin
    if (led[7] && (!adc_cs_n || sensor_sel != 0)) n_strobe_in_reset++;
    if (dut.u_gps.data_ready) n_gps_update++;
    if (dut.u_gps.u_communicator.gpsstate == GPS_HEADER3 && dut.u_gps.u_decoder.data_ready &&
        dut.u_gps.u_decoder.data_out != "R") n_hdr_abort++;
    if (dut.u_sensor.u_config.ssa_ready && !dut.u_sensor.u_config.display_ready &&
        (dut.u_sensor.u_config.zeroing)) n_zero++;
    if (dut.u_sensor.display_ready) n_meas++;
    if (dut.u_video.vreset) n_even_end++;
    if (dut.u_video.vcount == 523 && dut.u_video.u_vga.hreset) n_odd_end++;
    if (num_q == 31 && dut.sample_num == 0) n_wrap++;
    num_q <= dut.sample_num;
  end

  function automatic int bar_top(int k);
    for (int y = 200; y < 480; y++) if (frame[y][k * 90 + 45] == 3'd4) return y;
    return -1;
  endfunction

  task automatic press(int b, int hold);
    btn[b] = 1;
    repeat (hold) @(negedge clk);
    btn[b] = 0;
    repeat (10) @(negedge clk);
  endtask

  task automatic wait_frame();
    @(posedge dut.u_video.vreset);
    @(posedge dut.u_video.vreset);
    repeat (4) @(negedge clk);
  endtask

  task automatic check_bars(int expv [7], string what);
    for (int k = 0; k < 7; k++)
      check(bar_top(k), 474 - expv[k], $sformatf("%s: bar %0d top", what, k));
  endtask

  initial begin
    #3s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dry [7] = '{100, 100, 120, 120, 140, 140, 160};
    int wet [7] = '{200, 90, 180, 240, 141, 100, 210};
    int wet2 [7] = '{110, 130, 150, 170, 190, 210, 230};
    int wet3 [7] = '{150, 150, 150, 150, 150, 150, 150};
    int d1 [7], d2 [7], d3 [7], zeros [7];
    int t0, cyc0, dur;
    for (int k = 0; k < 7; k++) begin
      d1[k] = wet[k] > dry[k] ? wet[k] - dry[k] : 0;
      d2[k] = wet2[k] > dry[k] ? wet2[k] - dry[k] : 0;
      d3[k] = wet3[k] > dry[k] ? wet3[k] - dry[k] : 0;
      zeros[k] = 0;
      if (wet[k] < dry[k]) n_clamped++;
    end
    // power-up reset
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      if (led[7]) n_por_clocks++;
    end
    check(n_por_clocks, 15, "power-on reset clocks seen after the first edge");
    // GPS
    gps.idle(10);
    gps.send_string("$GPGGA,000001,3000.000,S,09000.000,W,1,05,1.5,10.0,M,,M,,*47\r\n");
    gps.send_string("$GPRMC,123519,A,4807.038,N,01131.000,W,022.4,084.4,230394,003.1,W*6A\r\n");
    gps.idle(2);
    check(n_gps_update, 1, "GPS updates");
    // zero over dry soil
    base = dry;
    press(0, 200);
    wait (dut.u_sensor.ssa_ready);
    repeat (5) @(negedge clk);
    check(dut.zero_offset[7:0], dry[0] + 3, "zero stored");
    // sample 1 over wet soil, timed
    base = wet;
    cyc0 = int'($time / 40);
    press(1, 300);
    wait (dut.display_ready);
    dur = int'($time / 40) - cyc0;
    check(int'(dur >= 56 * (7 * 500 + 1000)), 1, "burst time at least 56 ADC cycles at 50 kHz");
    check(int'(dur < 56 * (9 * 500 + 1000) + 2000), 1, "burst time at most 56 ADC cycles + slack");
    wait_frame();
    check_bars(d1, "sample 1");
    check(dut.stored, 1, "sample 1 stored");
    check(dut.shown_info.time_bcd, 24'h123519, "sample 1 time");
    check(dut.shown_info.lon_west, 1, "sample 1 longitude W");
    // next sample: empty
    press(2, 100);
    wait_frame();
    check(dut.sample_num, 1, "sample number 2 active");
    check(dut.stored, 0, "sample 2 empty");
    check_bars(zeros, "empty sample");
    check(dut.shown_info.time_bcd, 24'h123519, "empty number shows live GPS time");
    if (!dut.stored && bar_top(0) == 474) n_empty_view++;
    // sample 2
    base = wet2;
    press(1, 100);
    wait (dut.display_ready);
    wait_frame();
    check_bars(d2, "sample 2");
    // wrap around to sample 1
    for (int i = 0; i < 31; i++) press(2, 20);
    check(dut.sample_num, 0, "wrapped to sample 1");
    wait_frame();
    check_bars(d1, "sample 1 recalled");
    if (dut.stored && bar_top(0) == 474 - d1[0]) n_recall++;
    // replace sample 1
    base = wet3;
    press(1, 100);
    wait (dut.display_ready);
    wait_frame();
    check_bars(d3, "sample 1 replaced");
    if (bar_top(3) == 474 - d3[3]) n_replace++;
    // reset in the middle of a burst
    press(1, 50);
    repeat (20000) @(negedge clk);
    btn[3] = 1;
    repeat (5) @(negedge clk);
    check(int'(adc_cs_n && adc_wr_n && adc_rd_n && sensor_sel == 0), 1, "outputs idle in reset");
    btn[3] = 0;
    repeat (10) @(negedge clk);
    check(dut.stored, 0, "records cleared by reset");
    check(dut.sample_num, 0, "sample number after reset");
    if (!dut.u_sensor.u_communicator.busy) n_reset_mid_burst++;
    // mechanisms
    check(int'(n_gps_update > 0), 1, "mechanism: GPS sentence taken");
    check(int'(n_hdr_abort > 0), 1, "mechanism: other sentence rejected");
    check(int'(n_zero > 0), 1, "mechanism: zero calibration");
    check(int'(n_meas >= 3), 1, "mechanism: averaged measurements");
    check(int'(n_clamped > 0), 1, "mechanism: reading below zero clamped");
    check(int'(n_even_end > 0 && n_odd_end > 0), 1, "mechanism: both interlaced fields");
    check(int'(n_wrap > 0), 1, "mechanism: sample number wrap");
    check(int'(n_recall > 0), 1, "mechanism: stored record recalled");
    check(int'(n_replace > 0), 1, "mechanism: record replaced");
    check(int'(n_empty_view > 0), 1, "mechanism: empty sample view");
    check(int'(n_reset_mid_burst > 0), 1, "mechanism: reset during a burst");
    check(n_strobe_in_reset, 0, "ADC strobes or switches active in reset");
    $display("gps=%0d aborts=%0d zero=%0d meas=%0d fields=%0d/%0d wrap=%0d recall=%0d replace=%0d",
             n_gps_update, n_hdr_abort, n_zero, n_meas, n_even_end, n_odd_end, n_wrap, n_recall, n_replace);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
