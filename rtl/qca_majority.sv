// qca_majority: three-input majority gate, M = AB + BC + AC.
//
// The basic QCA logic device: three input cells drive a central voter cell
// whose polarisation follows the majority, and the output cell copies it.
// Fixing one input at logic 0 (cell polarisation -1) makes it a 2-input AND,
// fixing it at logic 1 (polarisation +1) makes it a 2-input OR. Logic 1 here
// stands for polarisation +1.
// Interface: a, b, c in; m out. Purely combinational.
module qca_majority (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic m
);
  assign m = (a & b) | (b & c) | (a & c);
endmodule
