// ctrl_inv: inverter with control.
//
// Passes its W-bit input through when ctrl is 0 and outputs the two's-
// complement negation (invert every bit, add one) when ctrl is 1. The
// dividers use it four ways: |X| and |Y| (ctrl = sign bit), -|Y| (ctrl =
// inverted sign bit), and to give the unsigned quotient and remainder their
// final signs. Purely combinational. Reading "inverter with control" as
// two's-complement negation is this design's reading; the invert-and-add-one
// structure is its own choice.
module ctrl_inv #(
  parameter int unsigned W = 12
) (
  input  logic         ctrl,
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);

  always_comb y = ctrl ? (~a + W'(1)) : a;

endmodule
