// One BCD digit adder built from Peres-gate full adders.
//
// Stage 1: four Peres full adders form the 5-bit binary sum s = a + b + cin.
// Stage 2: when s exceeds 9 (s[4] | s[3]&(s[2]|s[1]))
// the constant 6 is added to the whole 5-bit value by a second row of Peres
// full adders, and the result is kept to 5 bits. The output {sum[4], sum[3:0]}
// is the digit's decimal carry and corrected digit; for valid BCD digits this
// is the ordinary BCD sum 0..18. For out-of-range digits the 5-bit wrap is
// kept on purpose (D + D gives 00000), matching the documented behaviour.
//
// Interface: a, b (one BCD digit each), cin (carry from the digit below; tied
// to 0 in the adder, used by the subtractor) -> sum (5 bits). Purely
// combinational.
module bcd_digit_adder_peres
  import bcd_pkg::*;
(
  input  bcd_digit_t a,
  input  bcd_digit_t b,
  input  logic       cin,
  output digit_res_t sum
);
  digit_res_t s;        // binary sum before correction
  logic [3:0] c;        // ripple carries of the binary adder
  logic       fix;      // s > 9
  logic [5:1] k;        // ripple carries of the correction adder (k[5] dropped)

  // binary digit adder
  for (genvar i = 0; i < 4; i++) begin : g_add
    peres_full_adder u_fa (
      .x   (a[i]),
      .y   (b[i]),
      .cin (i == 0 ? cin : c[i-1]),
      .sum (s[i]),
      .cout(c[i])
    );
  end
  assign s[4] = c[3];

  assign fix = s[4] | (s[3] & (s[2] | s[1]));

  // correction: add 6 when fix; bit 0 of 6 is 0, so bit 0 is unchanged
  assign sum[0] = s[0];
  assign k[1]   = 1'b0;
  for (genvar i = 1; i < 5; i++) begin : g_fix
    peres_full_adder u_fa (
      .x   (s[i]),
      .y   (SIX[i] & fix),
      .cin (k[i]),
      .sum (sum[i]),
      .cout(k[i+1])
    );
  end
endmodule
