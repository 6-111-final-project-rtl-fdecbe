// uart_source: test driver for a serial line, 8 data bits LSB first,
// one start and one stop bit, CLOCKS_PER_BIT clocks per bit.  line is the
// logic-level line (idle high); line_n is its inverse, as the GPS receiver
// drives the board pin.  The tasks are called hierarchically by a test.
//
// Test-only serial source (8N1, LSB first) standing in for the GPS receiver.
module uart_source #(
  parameter int CLOCKS_PER_BIT = 5207
) (
  input  logic clk,
  output logic line,
  output logic line_n
);
  initial line = 1'b1;
  assign line_n = ~line;

  task automatic idle(int bits);
    line = 1'b1;
    repeat (bits * CLOCKS_PER_BIT) @(posedge clk);
  endtask

  task automatic send_byte(logic [7:0] b);
    line = 1'b0;
    repeat (CLOCKS_PER_BIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      line = b[i];
      repeat (CLOCKS_PER_BIT) @(posedge clk);
    end
    line = 1'b1;
    repeat (CLOCKS_PER_BIT) @(posedge clk);
  endtask

  task automatic send_string(string s);
    for (int i = 0; i < s.len(); i++) send_byte(s[i]);
  endtask
endmodule
