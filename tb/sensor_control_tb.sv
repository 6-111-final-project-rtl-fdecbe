// sensor_control_tb: runs ADC cycles against the ADC model.  The test
// makes its own enable pulse train (every 50 clocks while active) and
// checks, for several input voltages: the returned code, the order of the
// strobe edges (CS before WR, WR released before the read, RD only after
// INTR), one-clock sensor_ready, and that a cycle takes 8 enable pulses.
//
// Checks the strobe order and data capture against the ADC model.
module sensor_control_tb;
  localparam int PERIOD = 50;
  logic clk = 0, reset = 1, enable = 0, initiate = 0;
  logic cs, wr, rd, active, sensor_ready, intr;
  logic [7:0] sensor_data, db, vin = 0;
  int conversions;
  int checks = 0, failures = 0;

  sensor_control dut (.clk, .reset, .enable, .initiate, .intr, .sensor_in(db),
                      .cs, .wr, .rd, .active, .sensor_ready, .sensor_data);
  adc0841_model #(.CONV_CYCLES(300)) adc (.clk, .cs_n(cs), .wr_n(wr), .rd_n(rd),
                      .vin, .intr_n(intr), .db, .conversions);

  always #20 clk = ~clk;

  // enable pulses, phase restarted whenever active rises
  int ecount = 0;
  always @(posedge clk) begin
    if (!active) begin ecount <= 0; enable <= 0; end
    else begin
      ecount <= (ecount == PERIOD - 1) ? 0 : ecount + 1;
      enable <= (ecount == PERIOD / 2);
    end
  end

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  // event log of one cycle
  int t, t_cs_fall, t_wr_fall, t_wr_rise, t_rd_fall, t_rd_rise, t_ready, pulses, ready_len;
  logic cs_q = 1, wr_q = 1, rd_q = 1, ready_q = 0;
  always @(posedge clk) begin
    t++;
    if (enable) pulses++;
    if (cs_q && !cs && t_cs_fall < 0) t_cs_fall = t;
    if (wr_q && !wr) t_wr_fall = t;
    if (!wr_q && wr) t_wr_rise = t;
    if (rd_q && !rd) t_rd_fall = t;
    if (!rd_q && rd) t_rd_rise = t;
    if (sensor_ready) begin ready_len++; if (!ready_q) t_ready = t; end
    cs_q = cs; wr_q = wr; rd_q = rd; ready_q = sensor_ready;
  end

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] values [5] = '{8'h00, 8'hFF, 8'h5A, 8'hA5, 8'h37};
    repeat (5) @(posedge clk);
    @(negedge clk) reset = 0;
    check(cs & wr & rd, 1, "strobes idle high after reset");
    for (int i = 0; i < 5; i++) begin
      vin = values[i];
      t_cs_fall = -1; t_wr_fall = -1; t_wr_rise = -1; t_rd_fall = -1;
      t_rd_rise = -1; t_ready = -1; pulses = 0; ready_len = 0;
      @(negedge clk) initiate = 1;
      @(negedge clk) initiate = 0;
      check(active, 1, "active after initiate");
      wait (sensor_ready);
      @(negedge clk);
      @(negedge clk);
      check(sensor_data, values[i], "converted code");
      check(ready_len, 1, "sensor_ready width");
      check(pulses, 8, "enable pulses per cycle");
      check(int'(t_cs_fall < t_wr_fall), 1, "CS falls before WR");
      check(int'(t_wr_fall < t_wr_rise && t_wr_rise < t_rd_fall), 1, "write ends before read");
      check(int'(t_rd_fall < t_rd_rise && t_rd_rise < t_ready), 1, "read ends before ready");
      check(int'(cs && wr && rd && !active), 1, "back to idle");
      check(conversions, i + 1, "conversions done");
      repeat ($urandom_range(3, 40)) @(negedge clk);
    end
    // reset in the middle of a cycle returns the strobes high
    @(negedge clk) initiate = 1;
    @(negedge clk) initiate = 0;
    wait (!wr);
    @(negedge clk) reset = 1;
    @(negedge clk);
    check(int'(cs && wr && rd && !active && !sensor_ready), 1, "strobes released by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
