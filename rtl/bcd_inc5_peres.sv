// 5-bit incrementer from Peres half adders: y = x + cin (modulo 32).
//
// Adds the carry of the digit below (or the end-around carry) to a digit's
// corrected 5-bit result in the nine's-complement subtractor built with
// LATE_CARRY = 1. Each bit is a
// Peres gate with c = 0 (q = sum, r = carry). Purely combinational.
module bcd_inc5_peres
  import bcd_pkg::*;
(
  input  digit_res_t x,
  input  logic       cin,
  output digit_res_t y
);
  logic [5:0] c;    // carry chain; c[5] is dropped
  logic [4:0] g;    // garbage outputs
  assign c[0] = cin;

  for (genvar i = 0; i < 5; i++) begin : g_bit
    peres_gate u_pg (.a(x[i]), .b(c[i]), .c(1'b0), .p(g[i]), .q(y[i]), .r(c[i+1]));
  end
endmodule
