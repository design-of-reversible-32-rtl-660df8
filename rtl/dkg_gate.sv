// DKG gate: the 4x4 reversible gate of the combined adder/subtractor.
//
//   p = b
//   q = (~a & c) | (a & ~d)
//   r = ((a ^ b) & (c ^ d)) ^ (c & d)
//   s = b ^ c ^ d
//
// Input a selects the operation: with a = 0, r and s are the carry and sum of
// b + c + d (full adder); with a = 1 they are the borrow and difference of
// b - c - d (full subtractor). The equations are the standard definition of
// the gate; purely combinational.
module dkg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = b;
  assign q = (~a & c) | (a & ~d);
  assign r = ((a ^ b) & (c ^ d)) ^ (c & d);
  assign s = b ^ c ^ d;
endmodule
