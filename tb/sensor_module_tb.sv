// sensor_module_tb: the whole sensor path against the ADC model, at the
// default 50 kHz step rate.  The model's input depends on which pad pair
// the switches select, plus a ramp of 0..7 over the eight sweeps, so the
// average of a lane is its base value + 3.  The test presses zero over dry
// soil, then sample over wet soil (some depths drier than the zero), and
// checks the stored zero, the calibrated display, the clamp at 0, that a
// long press runs one burst only, that each burst is 8 x 7 conversions, and
// that one ADC cycle takes at least 7 steps of 500 clocks plus conversion.
//
// Runs at the default 500 clocks per step with a 40 us ADC model.
module sensor_module_tb;
  logic clk = 0, reset = 1, zero_request = 0, start_sensor = 0;
  logic [7:0] db, vin, sensor_data;
  logic intr, cs, wr, rd, sensor_ready, initiate, blip, ssa_ready, display_ready;
  logic [15:0] sel;
  logic [55:0] display, zero_offset;
  int conversions;
  int checks = 0, failures = 0;

  sensor_module dut (.clk, .reset, .zero_request, .start_sensor, .sensor_in(db), .intr,
                     .cs, .wr, .rd, .sensor_sel(sel), .sensor_data, .sensor_ready,
                     .initiate, .start_sensor_blip(blip), .sensor_display(display),
                     .zero_offset, .ssa_ready, .display_ready);
  adc0841_model #(.CONV_CYCLES(1000)) adc (.clk, .cs_n(cs), .wr_n(wr), .rd_n(rd),
                     .vin, .intr_n(intr), .db, .conversions);
  always #20 clk = ~clk;

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0h expected %0h", $time, what, got, exp);
    end
  endtask

  int base [7];
  int depth;
  always_comb begin
    depth = -1;
    for (int k = 0; k < 7; k++)
      if (sel == (16'(1) << k | 16'(1) << (k + 9))) depth = k;
    vin = (depth < 0) ? 8'h00 : 8'(base[depth] + (conversions / 7) % 8);
  end

  int n_ssa, n_blip, last_ready, min_gap, cyc;
  always @(posedge clk) begin
    cyc++;
    if (ssa_ready && !reset) n_ssa++;
    if (blip && !reset) n_blip++;
    if (sensor_ready) begin
      if (last_ready > 0 && cyc - last_ready < min_gap) min_gap = cyc - last_ready;
      last_ready = cyc;
    end
  end

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dry [7] = '{100, 100, 120, 120, 140, 140, 160};
    int wet [7] = '{200, 90, 180, 240, 141, 100, 210};
    min_gap = 1 << 30;
    repeat (5) @(negedge clk);
    reset = 0;
    // zero over dry soil, long press
    base = dry;
    @(negedge clk) zero_request = 1;
    repeat (2000) @(negedge clk);
    zero_request = 0;
    wait (ssa_ready);
    repeat (3) @(negedge clk);
    for (int d = 0; d < 7; d++) check(zero_offset[d*8 +: 8], dry[d] + 3, $sformatf("zero lane %0d", d));
    check(display, 0, "display after zero");
    check(conversions, 56, "conversions per burst");
    // sample over wet soil
    base = wet;
    @(negedge clk) start_sensor = 1;
    repeat (100) @(negedge clk);
    start_sensor = 0;
    wait (display_ready);
    @(negedge clk);
    for (int d = 0; d < 7; d++)
      check(display[d*8 +: 8], (wet[d] > dry[d]) ? wet[d] - dry[d] : 0, $sformatf("reading lane %0d", d));
    check(conversions, 112, "conversions after two bursts");
    check(n_ssa, 2, "bursts");
    check(n_blip, 2, "one request per press");
    check(int'(min_gap >= 7 * 500 + 1000), 1, "ADC cycle time");
    check(sel, 0, "switches open when idle");
    $display("shortest ADC cycle %0d clocks", min_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
