// synchronize: brings an asynchronous button level into the clock domain.
//
// Two flip-flops in series; the output follows the input two clock edges
// later and is high for as long as the button is held.  There is no reset:
// the chain flushes itself within two cycles.
//
// Origin: the original report's two-register synchroniser.
module synchronize (
  input  logic clk,
  input  logic in,
  output logic out
);
  logic meta;

  always_ff @(posedge clk) begin
    meta <= in;
    out  <= meta;
  end
endmodule
