// One digit slice of the DKG-gate BCD adder/subtractor.
//
// Three rows of DKG gates:
//   1. operand row: DKG(a=sub, b=sub&9[i], c=b[i], d=borrow) per bit. With
//      sub = 0 the gate adds 0 + b[i] + 0 and passes b; with sub = 1 it is a
//      full subtractor and the row forms 9 - b (mod 16), the nine's
//      complement.
//   2. adder row: DKG with a = 0 (full adder) forms the 5-bit sum of the
//      digit A, the row-1 operand and the carry-in cin.
//   3. correction row: when that sum exceeds 9, DKG full adders add 6 to the
//      5-bit value (kept to 5 bits).
// The output res is {carry, digit}. cin is the carry from the digit below
// (0 in add mode; bcd_addsub_dkg may also tie it to 0 and add the carry after
// the correction, see its LATE_CARRY parameter). The mapping of the
// operation onto DKG gates is this design's own; its function follows the
// Peres-gate adder and the TR-gate nine's-complement subtractor.
//
// Interface: a, b (BCD digits), sub (0 add, 1 subtract), cin -> res (5 bits).
// Purely combinational.
module dkg_digit_addsub
  import bcd_pkg::*;
(
  input  bcd_digit_t a,
  input  bcd_digit_t b,
  input  logic       sub,
  input  logic       cin,
  output digit_res_t res
);
  bcd_digit_t op;           // b or 9 - b
  logic [4:0] bw;           // operand-row borrow/carry chain
  digit_res_t s;            // binary sum
  logic [4:0] c;            // adder-row carries
  logic       fix;          // s > 9
  logic [5:1] k;            // correction-row carries
  logic [3:0] g_p1, g_q1, g_p2, g_q2;
  logic [4:1] g_p3, g_q3;   // garbage outputs

  // 1. operand row
  assign bw[0] = 1'b0;
  for (genvar i = 0; i < 4; i++) begin : g_op
    dkg_gate u_g (
      .a(sub), .b(sub & NINE[i]), .c(b[i]), .d(bw[i]),
      .p(g_p1[i]), .q(g_q1[i]), .r(bw[i+1]), .s(op[i])
    );
  end

  // 2. adder row
  assign c[0] = cin;
  for (genvar i = 0; i < 4; i++) begin : g_add
    dkg_gate u_g (
      .a(1'b0), .b(a[i]), .c(op[i]), .d(c[i]),
      .p(g_p2[i]), .q(g_q2[i]), .r(c[i+1]), .s(s[i])
    );
  end
  assign s[4] = c[4];

  // 3. correction row: add 6 when fix (bit 0 unchanged)
  assign fix    = s[4] | (s[3] & (s[2] | s[1]));
  assign res[0] = s[0];
  assign k[1]   = 1'b0;
  for (genvar i = 1; i < 5; i++) begin : g_fix
    dkg_gate u_g (
      .a(1'b0), .b(s[i]), .c(SIX[i] & fix), .d(k[i]),
      .p(g_p3[i]), .q(g_q3[i]), .r(k[i+1]), .s(res[i])
    );
  end
endmodule
