// N-digit BCD subtractor by the nine's-complement method (32-bit: 8 digits,
// 64-bit: 16 digits), with TR gates for the complement.
//
// Each digit adds a_i and the nine's complement 9 - b_i (nines_comp_tr) in a
// BCD digit adder (bcd_digit_adder_peres). The digits form one carry chain:
// c_i, the carry into digit i, is bit 4 of digit i-1's result, and c_0 is the
// carry out of the top digit, the end-around carry of the nine's-complement
// method. A top carry of 1 means a > b, and the digits then hold a - b; with
// a top carry of 0 they hold the nine's complement of b - a (all nines when
// a = b).
//
// The end-around carry is resolved without a combinational loop: a first row
// of digit adders runs the chain from c_0 = 0 and yields the top carry; a
// second row runs it again from that carry and drives diff. This is the value
// the closed loop settles to from an all-zero start.
//
// LATE_CARRY selects where the carry enters a digit:
//   0 (default): into the digit's binary adder, before the +6 correction,
//      which gives correct decimal results for valid BCD operands.
//   1: added to the corrected 5-bit digit result afterwards
//      (bcd_inc5_peres). This reproduces the published waveforms of the
//      unit bit for bit, but a digit whose corrected sum is 9 then becomes
//      1010 when a carry arrives instead of carrying on.
//
// Parameters: DIGITS (default 8; 16 gives the 64-bit unit), LATE_CARRY.
// diff[i] = {carry, digit} of digit i, diff[0] least significant. Purely
// combinational.
module bcd_subtractor_tr
  import bcd_pkg::*;
#(
  parameter int unsigned DIGITS     = DIGITS_32,
  parameter bit          LATE_CARRY = 1'b0
) (
  input  logic [4*DIGITS-1:0]     a,
  input  logic [4*DIGITS-1:0]     b,
  output digit_res_t [DIGITS-1:0] diff
);
  bcd_digit_t [DIGITS-1:0] bc;     // nine's complement of each b digit
  digit_res_t [DIGITS-1:0] trial;  // first row: chain started from 0
  logic       [DIGITS:0]   c0;     // first-row carries
  logic       [DIGITS:0]   c1;     // second-row carries

  assign c0[0] = 1'b0;
  assign c1[0] = c0[DIGITS];       // end-around carry

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    nines_comp_tr u_comp (
      .b(b[4*i +: 4]),
      .y(bc[i])
    );
    if (LATE_CARRY) begin : g_late
      digit_res_t pre;             // corrected digit sum before carry-in
      bcd_digit_adder_peres u_add (
        .a(a[4*i +: 4]), .b(bc[i]), .cin(1'b0), .sum(pre)
      );
      bcd_inc5_peres u_inc_trial (.x(pre), .cin(c0[i]), .y(trial[i]));
      bcd_inc5_peres u_inc       (.x(pre), .cin(c1[i]), .y(diff[i]));
    end else begin : g_early
      bcd_digit_adder_peres u_add_trial (
        .a(a[4*i +: 4]), .b(bc[i]), .cin(c0[i]), .sum(trial[i])
      );
      bcd_digit_adder_peres u_add (
        .a(a[4*i +: 4]), .b(bc[i]), .cin(c1[i]), .sum(diff[i])
      );
    end
    assign c0[i+1] = trial[i][4];
    assign c1[i+1] = diff[i][4];
  end
endmodule
