// parity_generator: reversible 3-bit odd-parity generator.
//
// parity = X1 xor (X2 xnor X3), so the 4-bit word {X1, X2, X3, parity}
// always holds an odd number of ones. Built, as in the source design, from
// two cascaded Feynman gates: the first takes X2 and X3, its XOR output is
// inverted to give X2 xnor X3, and the second Feynman gate combines X1 with
// that. The copy outputs of the two gates are the garbage outputs
// GAR1 = X1 and GAR2 = X2, which keep the circuit reversible.
// Interface: x1, x2, x3 in; parity, gar1, gar2 out. Purely combinational.
module parity_generator (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  output logic parity,
  output logic gar1,
  output logic gar2
);
  logic x2_xor_x3, x2_xnor_x3;

  feynman_gate u_fg0 (.a(x2), .b(x3),         .p(gar2), .q(x2_xor_x3));
  qca_inverter u_inv (.a(x2_xor_x3), .y(x2_xnor_x3));
  feynman_gate u_fg1 (.a(x1), .b(x2_xnor_x3), .p(gar1), .q(parity));
endmodule
