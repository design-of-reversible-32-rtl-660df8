// TR gate: the 3x3 reversible gate used for the subtractors.
//
//   p = a,  q = a ^ b,  r = (a & ~b) ^ c
//
// With c = 0 and the inputs (y, x) it is a half subtractor of x - y
// (q = difference, r = borrow); two of them make a full subtractor. The
// equations are the standard definition of the gate; purely combinational.
module tr_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & ~b) ^ c;
endmodule
