// Full subtractor from two TR gates: x - y - bin.
//
// The first gate, fed (y, x, 0), gives x ^ y and the borrow ~x & y; the
// second, fed (bin, x ^ y, borrow), gives diff = x ^ y ^ bin and
// bout = (~x & y) | (~(x ^ y) & bin). Pass-through outputs are garbage.
// Purely combinational.
module tr_full_subtractor (
  input  logic x,
  input  logic y,
  input  logic bin,
  output logic diff,
  output logic bout
);
  logic g0, g1, d0, b0;

  tr_gate u_tg0 (.a(y),   .b(x),  .c(1'b0), .p(g0), .q(d0),   .r(b0));
  tr_gate u_tg1 (.a(bin), .b(d0), .c(b0),   .p(g1), .q(diff), .r(bout));
endmodule
