// gps_clock_tb: at the default 5207 clocks per bit, the first enable
// comes 2603 clocks after counting rises, then one every 5207 clocks (4800 Hz
// at 25 MHz); none while not counting or in reset.
//
// Checks the first pulse at 2603 clocks and the 5207-clock period.
module gps_clock_tb;
  logic clk = 0, reset = 1, active = 0, enable;
  int checks = 0, failures = 0;

  gps_clock dut (.clk, .reset, .counting(active), .enable);
  always #20 clk = ~clk;   // 25 MHz

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000ms;
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
    repeat (52070) begin
      @(posedge clk); #1; cyc++;
      if (enable) begin
        if (pulses == 0) check(cyc, 2603, "first pulse after active");
        else check(cyc - last, 5207, "pulse period");
        last = cyc; pulses++;
      end
    end
    check(pulses, 10, "pulses in 52070 clocks");
    // reset while active
    @(negedge clk) reset = 1;
    pulses = 0;
    repeat (1000) begin @(posedge clk); #1; pulses += enable; end
    check(pulses, 0, "pulses during reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
