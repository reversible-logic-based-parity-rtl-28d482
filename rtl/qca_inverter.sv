// qca_inverter: QCA inverter gate.
//
// In the cell layout the signal splits and reaches the output cell through a
// diagonal (45 degree) coupling, which reverses the polarisation. Logically
// it is a NOT gate.
// Interface: a in; y = NOT a out. Purely combinational.
module qca_inverter (
  input  logic a,
  output logic y
);
  assign y = ~a;
endmodule
