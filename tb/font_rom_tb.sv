// font_rom_tb: reads glyph rows and checks a few of them against their
// expected dot patterns (space blank, the bars of 'I', 'H', 'L' and '-',
// rows outside the 7 glyph rows blank) and the one-clock read latency.
//
// Checks read latency and contents against the same hex file.
module font_rom_tb;
  logic clk = 0;
  logic [10:0] addr = 0;
  logic [7:0] dout;
  int checks = 0, failures = 0;

  font_rom dut (.clk, .addr, .dout);
  always #20 clk = ~clk;

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic rd(int code, int row, int exp, string what);
    @(negedge clk) addr = 11'(code * 12 + row);
    @(posedge clk) #1;
    check(dout, exp, what);
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 12; r++) rd(" ", r, 0, "space");
    rd("I", 2, 8'b0011_1000, "I top bar");
    rd("I", 5, 8'b0001_0000, "I stem");
    rd("I", 8, 8'b0011_1000, "I bottom bar");
    rd("H", 5, 8'b0111_1100, "H cross bar");
    rd("H", 2, 8'b0100_0100, "H sides");
    rd("L", 8, 8'b0111_1100, "L foot");
    rd("-", 5, 8'b0111_1100, "minus");
    for (int c = "A"; c <= "Z"; c++) begin
      rd(c, 0, 0, "row 0 blank");
      rd(c, 11, 0, "row 11 blank");
    end
    // latency: output changes only after the clock edge
    @(negedge clk) addr = 11'("H" * 12 + 5);
    @(posedge clk) #1;
    @(negedge clk) addr = 11'(" " * 12 + 5);
    #1 check(dout, 8'b0111_1100, "old data before the edge");
    @(posedge clk) #1;
    check(dout, 0, "new data after the edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
