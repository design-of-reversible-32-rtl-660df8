// 5-bit incrementer from DKG gates: y = x + cin (modulo 32).
//
// Each bit is a DKG gate with a = 0 and d = 0, which reduces it to a half
// adder (s = sum, r = carry). Used by the DKG adder/subtractor to add the
// carry of the digit below when built with LATE_CARRY = 1. Purely
// combinational.
module dkg_inc5
  import bcd_pkg::*;
(
  input  digit_res_t x,
  input  logic       cin,
  output digit_res_t y
);
  logic [5:0] c;            // carry chain; c[5] is dropped
  logic [4:0] g_p, g_q;     // garbage outputs
  assign c[0] = cin;

  for (genvar i = 0; i < 5; i++) begin : g_bit
    dkg_gate u_g (
      .a(1'b0), .b(x[i]), .c(c[i]), .d(1'b0),
      .p(g_p[i]), .q(g_q[i]), .r(c[i+1]), .s(y[i])
    );
  end
endmodule
