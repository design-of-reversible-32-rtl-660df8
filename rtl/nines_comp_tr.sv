// Nine's complementer of one BCD digit from TR-gate full subtractors.
//
// A ripple of four TR full subtractors computes y = 9 - b as a 4-bit binary
// difference (modulo 16; the final borrow is dropped). For b = 0..9 this is
// the nine's complement; for the codes 10..15 it wraps (b = 10 gives 15),
// which is the behaviour of the documented subtractor.
//
// Interface: b (4 bits) -> y (4 bits). Purely combinational.
module nines_comp_tr
  import bcd_pkg::*;
(
  input  bcd_digit_t b,
  output bcd_digit_t y
);
  logic [4:0] bw;   // borrow chain, bw[0] = 0
  assign bw[0] = 1'b0;

  for (genvar i = 0; i < 4; i++) begin : g_sub
    tr_full_subtractor u_fs (
      .x   (NINE[i]),
      .y   (b[i]),
      .bin (bw[i]),
      .diff(y[i]),
      .bout(bw[i+1])
    );
  end
endmodule
