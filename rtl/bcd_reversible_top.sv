// Reversible-logic BCD arithmetic: the six units side by side.
//
//   add32 / add64 : 8- and 16-digit BCD adders from Peres gates
//   sub32 / sub64 : 8- and 16-digit nine's-complement BCD subtractors, TR gates
//   dkg32 / dkg64 : 8- and 16-digit BCD adder/subtractors from DKG gates,
//                   sub = 0 adds, sub = 1 subtracts
//
// The units are independent designs; each has its own operand ports and its
// own per-digit 5-bit results ({carry, digit}, element 0 = least significant
// digit). Nothing is shared and nothing is registered: the whole top is
// combinational, results follow the operands after the gate delays.
module bcd_reversible_top
  import bcd_pkg::*;
(
  input  logic [31:0]                add32_a,
  input  logic [31:0]                add32_b,
  output digit_res_t [DIGITS_32-1:0] add32_sum,

  input  logic [31:0]                sub32_a,
  input  logic [31:0]                sub32_b,
  output digit_res_t [DIGITS_32-1:0] sub32_diff,

  input  logic [63:0]                add64_a,
  input  logic [63:0]                add64_b,
  output digit_res_t [DIGITS_64-1:0] add64_sum,

  input  logic [63:0]                sub64_a,
  input  logic [63:0]                sub64_b,
  output digit_res_t [DIGITS_64-1:0] sub64_diff,

  input  logic [31:0]                dkg32_a,
  input  logic [31:0]                dkg32_b,
  input  logic                       dkg32_sub,
  output digit_res_t [DIGITS_32-1:0] dkg32_res,

  input  logic [63:0]                dkg64_a,
  input  logic [63:0]                dkg64_b,
  input  logic                       dkg64_sub,
  output digit_res_t [DIGITS_64-1:0] dkg64_res
);
  bcd_adder_peres   #(.DIGITS(DIGITS_32)) u_add32 (.a(add32_a), .b(add32_b), .sum(add32_sum));
  bcd_subtractor_tr #(.DIGITS(DIGITS_32)) u_sub32 (.a(sub32_a), .b(sub32_b), .diff(sub32_diff));
  bcd_adder_peres   #(.DIGITS(DIGITS_64)) u_add64 (.a(add64_a), .b(add64_b), .sum(add64_sum));
  bcd_subtractor_tr #(.DIGITS(DIGITS_64)) u_sub64 (.a(sub64_a), .b(sub64_b), .diff(sub64_diff));
  bcd_addsub_dkg    #(.DIGITS(DIGITS_32)) u_dkg32 (.a(dkg32_a), .b(dkg32_b), .sub(dkg32_sub), .res(dkg32_res));
  bcd_addsub_dkg    #(.DIGITS(DIGITS_64)) u_dkg64 (.a(dkg64_a), .b(dkg64_b), .sub(dkg64_sub), .res(dkg64_res));
endmodule
