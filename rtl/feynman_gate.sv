// feynman_gate: 2x2 reversible Feynman (controlled-NOT) gate.
//
// Outputs P = A and Q = A xor B; the mapping (A,B) -> (P,Q) is one-to-one,
// so no input information is lost. The gate equations are the source
// design's. The QCA layout it comes from realises the XOR with a compact
// cell arrangement whose structure is not reproduced here; instead the XOR
// is built from the basic QCA primitives in the textbook way:
//   Q = OR( AND(A, NOT B), AND(NOT A, B) )
// where AND is a majority gate with one input fixed at 0 and OR is a
// majority gate with one input fixed at 1.
// Interface: a, b in; p, q out. Purely combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  logic a_n, b_n, a_and_bn, an_and_b;

  qca_inverter u_inv_a (.a(a), .y(a_n));
  qca_inverter u_inv_b (.a(b), .y(b_n));

  // AND gates: third majority input fixed at logic 0 (polarisation -1).
  qca_majority u_and0 (.a(a),   .b(b_n), .c(1'b0), .m(a_and_bn));
  qca_majority u_and1 (.a(a_n), .b(b),   .c(1'b0), .m(an_and_b));
  // OR gate: third majority input fixed at logic 1 (polarisation +1).
  qca_majority u_or   (.a(a_and_bn), .b(an_and_b), .c(1'b1), .m(q));

  assign p = a;
endmodule
