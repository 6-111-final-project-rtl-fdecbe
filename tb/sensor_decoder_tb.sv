// sensor_decoder_tb: answers each initiate with a random byte after a
// random delay, and checks the switch pattern of every depth (written out
// here as constants), seven initiates per sweep, the packing of the bytes
// into the 56-bit word, a single stream_ready pulse, switches open after
// the sweep, and that a request during a sweep is ignored.
//
// Checks the switch pattern of each depth and the packed 56-bit result.
module sensor_decoder_tb;
  logic clk = 0, reset = 1, start_sample = 0, sensor_ready = 0;
  logic [7:0] sensor_data = 0;
  logic initiate, stream_ready;
  logic [15:0] sensor_sel;
  logic [55:0] raw;
  int checks = 0, failures = 0;

  sensor_decoder dut (.clk, .reset, .start_sample, .sensor_ready, .sensor_data,
                      .initiate, .stream_ready, .sensor_sel, .sensor_stream_raw(raw));
  always #20 clk = ~clk;

  localparam logic [15:0] SEL [7] = '{16'h0201, 16'h0402, 16'h0804, 16'h1008,
                                      16'h2010, 16'h4020, 16'h8040};

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0h expected %0h", $time, what, got, exp);
    end
  endtask

  // ADC side
  logic [55:0] expected;
  int n_init, n_ready;
  always @(posedge clk) begin
    if (initiate) begin
      n_init++;
      #1;
      check(sensor_sel, SEL[n_init-1], $sformatf("switches for depth %0d", n_init - 1));
      fork
        begin
          automatic logic [7:0] v = 8'($urandom);
          repeat ($urandom_range(1, 20)) @(negedge clk);
          expected[(n_init-1)*8 +: 8] = v;
          sensor_data = v;
          sensor_ready = 1;
          @(negedge clk) sensor_ready = 0;
        end
      join_none
    end
    if (stream_ready) n_ready++;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    for (int sweep = 0; sweep < 4; sweep++) begin
      n_init = 0; n_ready = 0;
      @(negedge clk) start_sample = 1;
      @(negedge clk) start_sample = 0;
      repeat (5) @(negedge clk);
      start_sample = 1;                    // ignored: sweep running
      @(negedge clk) start_sample = 0;
      wait (stream_ready);
      @(negedge clk);
      check(raw, expected, "packed sweep");
      check(sensor_sel, 0, "switches open after sweep");
      repeat (30) @(negedge clk);
      check(n_init, 7, "initiates per sweep");
      check(n_ready, 1, "stream_ready pulses");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
