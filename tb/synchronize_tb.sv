// synchronize_tb: the output must equal the input of two clocks earlier.
//
// Checks that the output is the input delayed by two clocks.
module synchronize_tb;
  logic clk = 0, in = 0, out;
  int checks = 0, failures = 0;
  logic [1:0] hist = '0;

  synchronize dut (.clk, .in, .out);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      if (i > 2) begin
        checks++;
        if (out !== hist[0]) begin
          failures++;
          $display("cycle %0d: out=%b expected %b", i, out, hist[0]);
        end
      end
      hist = {hist[0], in};
      in = 1'($urandom_range(0, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
