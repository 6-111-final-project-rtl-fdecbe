// sensor_clock_tb: at the default 500 clocks per sample, the first enable
// comes 250 clocks after active rises, then one every 500 clocks (50 kHz at
// 25 MHz); none while inactive or in reset.
//
// Checks the first pulse at 250 clocks and the 500-clock period.
module sensor_clock_tb;
  logic clk = 0, reset = 1, active = 0, enable;
  int checks = 0, failures = 0;

  sensor_clock dut (.clk, .reset, .active, .enable);
  always #20 clk = ~clk;   // 25 MHz

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last, pulses;
    repeat (3) @(posedge clk);
    reset = 0;
    // inactive: no pulses
    pulses = 0;
    repeat (2000) begin @(posedge clk); pulses += enable; end
    check(pulses, 0, "pulses while inactive");
    // active: measure positions of pulses
    @(negedge clk) active = 1;
    cyc = 0; last = -1; pulses = 0;
    repeat (5000) begin
      @(posedge clk); #1; cyc++;
      if (enable) begin
        if (pulses == 0) check(cyc, 250, "first pulse after active");
        else check(cyc - last, 500, "pulse period");
        last = cyc; pulses++;
      end
    end
    check(pulses, 10, "pulses in 5000 clocks");
    // reset while active
    @(negedge clk) reset = 1;
    pulses = 0;
    repeat (1000) begin @(posedge clk); #1; pulses += enable; end
    check(pulses, 0, "pulses during reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
