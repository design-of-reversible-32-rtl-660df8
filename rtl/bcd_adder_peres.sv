// N-digit BCD adder from Peres-gate digit adders (32-bit: 8 digits,
// 64-bit: 16 digits).
//
// Every digit pair a[4i+3:4i], b[4i+3:4i] goes to its own
// bcd_digit_adder_peres; the digits work in parallel and no carry passes from
// one digit to the next, as in the documented unit. Each digit's carry
// appears instead as bit 4 of its 5-bit result sum[i]. sum[0] belongs to the
// least significant digit.
//
// Parameter DIGITS (default 8, the 32-bit unit; 16 gives the 64-bit unit).
// Purely combinational.
module bcd_adder_peres
  import bcd_pkg::*;
#(
  parameter int unsigned DIGITS = DIGITS_32
) (
  input  logic [4*DIGITS-1:0]     a,
  input  logic [4*DIGITS-1:0]     b,
  output digit_res_t [DIGITS-1:0] sum
);
  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    bcd_digit_adder_peres u_dig (
      .a  (a[4*i +: 4]),
      .b  (b[4*i +: 4]),
      .cin(1'b0),
      .sum(sum[i])
    );
  end
endmodule
