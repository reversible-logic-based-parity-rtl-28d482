// parity_checker: reversible odd-parity checker for a 3-bit message plus
// its parity bit.
//
// check_bit = ((X1 xor X2)' xor (X3 xor P)')' , which equals
// NOT(X1 xor X2 xor X3 xor P): it is 1 when the received 4-bit word holds an
// even number of ones, i.e. an odd number of bits were corrupted on the
// way. The expression is built as written in the source design: a Feynman
// gate on (X1, X2), one on (X3, P), both XOR outputs inverted, a third
// Feynman gate combining them and a final inverter. The message bits come
// out unchanged as garbage outputs GAR1..GAR3 = X1..X3.
// Interface: x1, x2, x3, parity in; check_bit, gar1..gar3 out.
// Purely combinational.
module parity_checker (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic parity,
  output logic check_bit,
  output logic gar1,
  output logic gar2,
  output logic gar3
);
  logic x12, x3p, x12_n, x3p_n, all_n, p_unused;

  feynman_gate u_fg_a (.a(x1), .b(x2),     .p(gar1), .q(x12));
  feynman_gate u_fg_b (.a(x3), .b(parity), .p(gar3), .q(x3p));
  qca_inverter u_inv_a (.a(x12), .y(x12_n));
  qca_inverter u_inv_b (.a(x3p), .y(x3p_n));
  // The copy output of the last Feynman gate is an internal garbage line.
  feynman_gate u_fg_c (.a(x12_n), .b(x3p_n), .p(p_unused), .q(all_n));
  qca_inverter u_inv_c (.a(all_n), .y(check_bit));

  assign gar2 = x2;
endmodule
