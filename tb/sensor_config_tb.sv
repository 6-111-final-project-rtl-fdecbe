// sensor_config_tb: raw readings pass through before calibration; a zero
// request stores the next reading and clears the display; later readings
// show reading minus zero per lane, 0 where the reading is below the zero;
// display_ready pulses for measurements only.
//
// Checks zero storage, subtraction and clamping at zero.
module sensor_config_tb;
  logic clk = 0, reset = 1, update_zero = 0, ssa_ready = 0;
  logic [55:0] avg = 0, zero_offset, display;
  logic display_ready;
  int checks = 0, failures = 0;

  sensor_config dut (.clk, .reset, .update_zero, .sensor_stream_averaged(avg),
                     .ssa_ready, .zero_offset, .sensor_display(display), .display_ready);
  always #20 clk = ~clk;

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0h expected %0h", $time, what, got, exp);
    end
  endtask

  int n_ready;
  always @(posedge clk) if (display_ready) n_ready++;

  task automatic deliver(logic [55:0] v);
    @(negedge clk) begin avg = v; ssa_ready = 1; end
    @(negedge clk) ssa_ready = 0;
    @(negedge clk);
  endtask

  function automatic logic [55:0] expect_diff(logic [55:0] a, logic [55:0] z);
    logic [55:0] r;
    for (int d = 0; d < 7; d++)
      r[d*8 +: 8] = (int'(a[d*8 +: 8]) > int'(z[d*8 +: 8])) ?
                    8'(int'(a[d*8 +: 8]) - int'(z[d*8 +: 8])) : 8'd0;
    return r;
  endfunction

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [55:0] z, v;
    repeat (3) @(negedge clk);
    reset = 0;
    n_ready = 0;
    deliver(56'h11223344556677);
    check(display, 56'h11223344556677, "uncalibrated reading");
    check(n_ready, 1, "display_ready for measurement");
    // zero
    z = 56'h40_40_40_40_40_40_40;
    @(negedge clk) update_zero = 1;
    @(negedge clk) update_zero = 0;
    repeat (10) @(negedge clk);
    deliver(z);
    check(zero_offset, z, "zero stored");
    check(display, 0, "display cleared by zero");
    check(n_ready, 1, "no display_ready for zero");
    for (int i = 0; i < 20; i++) begin
      v = {8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom),
           8'($urandom), 8'($urandom), 8'($urandom)};
      deliver(v);
      check(display, expect_diff(v, z), "calibrated reading");
    end
    check(n_ready, 21, "display_ready count");
    check(zero_offset, z, "zero kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
