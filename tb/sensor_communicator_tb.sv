// sensor_communicator_tb: answers each start_sample with a random sweep and
// checks that a request brings exactly 8 sweeps, that every byte lane of
// the result is the lane's sum of the 8 sweeps divided by 8 (rounded down),
// a single ssa_ready pulse, and that blips during a burst are ignored.
//
// Checks per-depth averaging of 8 sweeps and that requests while busy are ignored.
module sensor_communicator_tb;
  logic clk = 0, reset = 1, blip = 0, stream_ready = 0;
  logic [55:0] raw = 0, avg;
  logic start_sample, ssa_ready;
  int checks = 0, failures = 0;

  sensor_communicator dut (.clk, .reset, .start_sensor_blip(blip), .stream_ready,
                           .sensor_stream_raw(raw), .start_sample,
                           .sensor_stream_averaged(avg), .ssa_ready);
  always #20 clk = ~clk;

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0h expected %0h", $time, what, got, exp);
    end
  endtask

  int lane_sum [7];
  int n_req, n_ssa;
  always @(posedge clk) begin
    if (start_sample) begin
      n_req++;
      fork
        begin
          automatic logic [55:0] v = {8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom),
                                      8'($urandom), 8'($urandom), 8'($urandom)};
          if (n_req % 3 == 0) v = '1;            // lanes at full scale
          repeat ($urandom_range(1, 30)) @(negedge clk);
          for (int d = 0; d < 7; d++) lane_sum[d] += int'(v[d*8 +: 8]);
          raw = v;
          stream_ready = 1;
          @(negedge clk) stream_ready = 0;
        end
      join_none
    end
    if (ssa_ready) n_ssa++;
  end

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    for (int burst = 0; burst < 5; burst++) begin
      n_req = 0; n_ssa = 0;
      foreach (lane_sum[d]) lane_sum[d] = 0;
      @(negedge clk) blip = 1;
      @(negedge clk) blip = 0;
      repeat (40) @(negedge clk);
      blip = 1;                        // ignored while busy
      @(negedge clk) blip = 0;
      wait (ssa_ready);
      @(negedge clk);
      for (int d = 0; d < 7; d++)
        check(avg[d*8 +: 8], lane_sum[d] / 8, $sformatf("burst %0d lane %0d average", burst, d));
      repeat (50) @(negedge clk);
      check(n_req, 8, "sweeps per request");
      check(n_ssa, 1, "ssa_ready pulses");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
