// gps_decoder_tb: serial bytes from the test driver, at 104 clocks per bit
// (the bit timebase is a gps_clock instance).  Checks: nothing is taken
// before the line has been idle for 8 bit times, every byte sent afterwards
// arrives once with the right value (LSB first, the letter 'p' included),
// a short low glitch on the idle line yields no byte, and data_ready is one
// clock wide.
//
// Checks bytes, the idle requirement and the bad-stop-bit path.
module gps_decoder_tb;
  localparam int CPB = 104;
  logic clk = 0, reset = 1, enable, counting, data_ready;
  logic [7:0] data_out;
  logic line, line_n;
  int checks = 0, failures = 0;

  uart_source #(.CLOCKS_PER_BIT(CPB)) src (.clk, .line, .line_n);
  gps_clock #(.CLOCKS_PER_BIT(CPB)) bitclk (.clk, .reset, .counting, .enable);
  gps_decoder dut (.clk, .reset, .enable, .data(line), .counting, .data_ready, .data_out);
  always #20 clk = ~clk;

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0h expected %0h", $time, what, got, exp);
    end
  endtask

  logic [7:0] got_q [$];
  logic ready_q = 0;
  int wide = 0;
  always @(posedge clk) begin
    if (data_ready && !reset) got_q.push_back(data_out);
    if (data_ready && ready_q) wide++;
    ready_q <= data_ready;
  end

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string msg = "p$GPRMC,0Az\r\n";
    repeat (3) @(negedge clk);
    reset = 0;
    // line busy (low) at power-up, then a byte after only 3 idle bits
    src.line = 1'b0;
    repeat (5 * CPB) @(negedge clk);
    src.idle(3);
    src.send_byte(8'h55);
    check(got_q.size(), 0, "bytes before 8 idle bits");
    src.idle(10);
    got_q.delete();
    src.send_string(msg);
    src.idle(2);
    // glitch
    src.line = 1'b0;
    repeat (10) @(negedge clk);
    src.line = 1'b1;
    src.idle(3);
    src.send_byte(8'hC3);
    src.idle(3);
    check(got_q.size(), msg.len() + 1, "bytes received");
    for (int i = 0; i < msg.len() && i < got_q.size(); i++)
      check(got_q[i], msg[i], $sformatf("byte %0d", i));
    if (got_q.size() == msg.len() + 1) check(got_q[msg.len()], 8'hC3, "byte after glitch");
    check(wide, 0, "data_ready wider than a clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
