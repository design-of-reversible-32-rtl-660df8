// N-digit BCD adder/subtractor from DKG gates (32-bit: 8 digits, 64-bit:
// 16 digits), one select pin choosing the operation.
//
// sub = 0: every digit is an independent BCD digit adder; res[i] = {carry,
//          digit} of a_i + b_i, no carry passes between digits (the same
//          result as bcd_adder_peres).
// sub = 1: nine's-complement subtraction with a digit carry chain and an
//          end-around carry (the same result as bcd_subtractor_tr with the
//          same LATE_CARRY): c_i = res[i-1][4], c_0 = carry out of the top
//          digit, a top carry of 1 meaning a > b.
// Each digit is a dkg_digit_addsub slice. The end-around carry is resolved
// without a loop: a first row runs the chain from c_0 = 0 to find the top
// carry, a second row runs it from that carry and drives res. In add mode
// every carry-in is forced to 0.
//
// LATE_CARRY = 0 (default) feeds the carry into each slice before its +6
// correction (correct decimal results); LATE_CARRY = 1 adds it to the
// corrected 5-bit result with dkg_inc5 rows, reproducing the published
// waveforms of the nine's-complement subtractor bit for bit.
//
// Parameters: DIGITS (default 8; 16 gives the 64-bit unit), LATE_CARRY.
// res[0] is the least significant digit. Purely combinational.
module bcd_addsub_dkg
  import bcd_pkg::*;
#(
  parameter int unsigned DIGITS     = DIGITS_32,
  parameter bit          LATE_CARRY = 1'b0
) (
  input  logic [4*DIGITS-1:0]     a,
  input  logic [4*DIGITS-1:0]     b,
  input  logic                    sub,
  output digit_res_t [DIGITS-1:0] res
);
  digit_res_t [DIGITS-1:0] trial;  // first row: chain started from 0
  logic       [DIGITS:0]   c0;     // first-row carries
  logic       [DIGITS:0]   c1;     // second-row carries

  assign c0[0] = 1'b0;
  assign c1[0] = c0[DIGITS];       // end-around carry

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    if (LATE_CARRY) begin : g_late
      digit_res_t pre;             // slice result before carry-in
      dkg_digit_addsub u_slice (
        .a(a[4*i +: 4]), .b(b[4*i +: 4]), .sub(sub), .cin(1'b0), .res(pre)
      );
      dkg_inc5 u_inc_trial (.x(pre), .cin(sub & c0[i]), .y(trial[i]));
      dkg_inc5 u_inc       (.x(pre), .cin(sub & c1[i]), .y(res[i]));
    end else begin : g_early
      dkg_digit_addsub u_slice_trial (
        .a(a[4*i +: 4]), .b(b[4*i +: 4]), .sub(sub), .cin(sub & c0[i]), .res(trial[i])
      );
      dkg_digit_addsub u_slice (
        .a(a[4*i +: 4]), .b(b[4*i +: 4]), .sub(sub), .cin(sub & c1[i]), .res(res[i])
      );
    end
    assign c0[i+1] = trial[i][4];
    assign c1[i+1] = res[i][4];
  end
endmodule
