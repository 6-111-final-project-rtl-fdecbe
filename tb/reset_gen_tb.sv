// reset_gen_tb: reset is high for exactly 16 clocks after power-up, then
// follows the button.
//
// Checks the 16-clock power-on reset and the button path.
module reset_gen_tb;
  logic clk = 0, reset_button = 0, reset;
  int checks = 0, failures = 0;

  reset_gen dut (.clk, .reset_button, .reset);
  always #5 clk = ~clk;

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int i = 0; i < 20; i++) begin
      check(reset, i < 16, $sformatf("power-up clock %0d", i));
      @(posedge clk); #1;
    end
    reset_button = 1; #1;
    check(reset, 1'b1, "button held");
    repeat (3) @(posedge clk);
    reset_button = 0; #1;
    check(reset, 1'b0, "button released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
