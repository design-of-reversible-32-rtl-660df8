// Peres gate: the 3x3 reversible gate used for the adders.
//
//   p = a,  q = a ^ b,  r = (a & b) ^ c
//
// With c = 0 it is a half adder (q = sum, r = carry); two of them make a full
// adder. The equations are the standard definition of the gate; purely
// combinational.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
