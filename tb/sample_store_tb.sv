// sample_store_tb: stores records under sample numbers 0 and 1, checks
// that an empty number shows flat bars and the live GPS information, that a held button advances
// the number once, that the number wraps after 32, that a stored record is
// shown again when its number comes back, and that a new measurement
// replaces it.
//
// Checks store, recall, replace, wrap at 32 and clearing by reset.
module sample_store_tb;
  import soil_pkg::*;
  logic clk = 0, reset = 1, next_sample = 0, meas_ready = 0;
  logic [55:0] measurement = 0, shown_meas;
  gps_info_t live_info = '0, shown_info;
  logic [4:0] sample_num;
  logic stored;
  int checks = 0, failures = 0;

  sample_store dut (.clk, .reset, .next_sample, .meas_ready, .measurement, .live_info,
                    .sample_num, .stored, .shown_meas, .shown_info);
  always #20 clk = ~clk;

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0h expected %0h", $time, what, got, exp);
    end
  endtask

  task automatic press(int hold);
    @(negedge clk) next_sample = 1;
    repeat (hold) @(negedge clk);
    next_sample = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic measure(logic [55:0] m, logic [23:0] t);
    live_info.time_bcd = t;
    @(negedge clk) begin measurement = m; meas_ready = 1; end
    @(negedge clk) meas_ready = 0;
    live_info.time_bcd = 24'h999999;     // the live record moves on
    @(negedge clk);
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    check(sample_num, 0, "first sample number");
    check(stored, 0, "empty at start");
    check(shown_meas, 0, "blank measurement");
    measure(56'h01020304050607, 24'h101010);
    check(stored, 1, "sample 0 stored");
    check(shown_meas, 56'h01020304050607, "sample 0 measurement");
    check(shown_info.time_bcd, 24'h101010, "sample 0 time");
    press(50);
    check(sample_num, 1, "held button advances once");
    check(stored, 0, "sample 1 empty");
    check(shown_meas, 0, "empty number: flat bars");
    live_info.time_bcd = 24'h131313;
    #1 check(shown_info.time_bcd, 24'h131313, "empty number: live GPS shown");
    measure(56'hAABBCCDDEEFF11, 24'h121212);
    check(shown_meas, 56'hAABBCCDDEEFF11, "sample 1 measurement");
    for (int i = 0; i < 31; i++) press(2);
    check(sample_num, 0, "wrapped to sample 0");
    check(stored, 1, "sample 0 still stored");
    check(shown_meas, 56'h01020304050607, "sample 0 recalled");
    check(shown_info.time_bcd, 24'h101010, "sample 0 time recalled");
    measure(56'h77777777777777, 24'h131313);
    check(shown_meas, 56'h77777777777777, "sample 0 replaced");
    press(2);
    check(shown_meas, 56'hAABBCCDDEEFF11, "sample 1 kept");
    press(2);
    check(stored, 0, "sample 2 empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
