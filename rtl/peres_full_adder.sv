// Full adder from two Peres gates.
//
// The first gate forms x ^ y and x & y, the second adds the carry in:
// sum = x ^ y ^ cin, cout = ((x ^ y) & cin) ^ (x & y). The gates' pass-through
// outputs are garbage outputs of the reversible circuit and are left unused.
// Purely combinational.
module peres_full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic g0, g1, xy_x, xy_a;

  peres_gate u_pg0 (.a(x),    .b(y),   .c(1'b0), .p(g0), .q(xy_x), .r(xy_a));
  peres_gate u_pg1 (.a(xy_x), .b(cin), .c(xy_a), .p(g1), .q(sum),  .r(cout));
endmodule
