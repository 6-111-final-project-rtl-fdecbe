// reset_gen: system reset from power-up and from the reset button.
//
// A POR_CYCLES-bit shift register is loaded with ones at configuration and
// shifts in zeros, so reset is held for the first POR_CYCLES clocks after
// power-up.  The (already synchronised) reset button is ORed in; the result
// is active high and not registered.  por_sr has a declaration initial
// value on purpose: it is the power-up content of the register (lint notes
// the initial value next to the procedural assignment).
//
// Origin: the 16-clock power-on reset ORed with the button follows the
// original top level (an SRL16 there); the plain shift register is this
// design's portable equivalent.
module reset_gen #(
  parameter int POR_CYCLES = 16
) (
  input  logic clk,
  input  logic reset_button,
  output logic reset
);
  logic [POR_CYCLES-1:0] por_sr = '1;   // FPGA power-up value

  always_ff @(posedge clk)
    por_sr <= {por_sr[POR_CYCLES-2:0], 1'b0};

  assign reset = por_sr[POR_CYCLES-1] | reset_button;
endmodule
