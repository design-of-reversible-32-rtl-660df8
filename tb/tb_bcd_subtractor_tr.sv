// Test of the nine's-complement BCD subtractor at 8 and 16 digits, with the
// carry entering each digit before the correction (default) and after it
// (LATE_CARRY = 1).
//  * All-zero operands: every digit reads 01001 (nine, no carry).
//  * The published 32-bit and 64-bit example operands on the LATE_CARRY
//    units, against the published per-digit results (digit 1 first).
//  * Random valid BCD words on the default units against decimal
//    arithmetic: a + (10^n - 1 - b) + [a > b], digit carries included; also
//    equal operands (all nines) and the end-around carry seen both ways.
//  * Random codes on all units against the bit-true model.
module tb_bcd_subtractor_tr;
  import bcd_ref_pkg::*;
  import bcd_pkg::*;

  logic [31:0] a8, b8;
  logic [63:0] a16, b16;
  digit_res_t [7:0]  d8, l8;
  digit_res_t [15:0] d16, l16;
  int checks = 0, failures = 0;
  int eac_seen [2] = '{0, 0};
  bit eac;

  bcd_subtractor_tr                                  dut8   (.a(a8),  .b(b8),  .diff(d8));
  bcd_subtractor_tr #(.DIGITS(16))                   dut16  (.a(a16), .b(b16), .diff(d16));
  bcd_subtractor_tr #(.LATE_CARRY(1'b1))             late8  (.a(a8),  .b(b8),  .diff(l8));
  bcd_subtractor_tr #(.DIGITS(16), .LATE_CARRY(1'b1)) late16 (.a(a16), .b(b16), .diff(l16));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [79:0] got, input logic [79:0] exp_v, input int n);
    for (int i = 0; i < n; i++) begin
      checks++;
      if (got[5*i +: 5] !== exp_v[5*i +: 5]) begin
        failures++;
        $display("FAIL %s digit %0d: got %b expected %b", what, i + 1, got[5*i +: 5], exp_v[5*i +: 5]);
      end
    end
  endtask

  localparam logic [39:0] EX32 = {5'b10011, 5'b10011, 5'b00000, 5'b01010,
                                  5'b11000, 5'b10100, 5'b10011, 5'b10110};
  localparam logic [79:0] NINES = {16{5'b01001}};

  logic [79:0] e;

  initial begin
    a8 = '0; b8 = '0; a16 = '0; b16 = '0;
    #1;
    check("zero32", 80'(d8), NINES, 8);
    check("zero64", 80'(d16), NINES, 16);
    check("zero32 late", 80'(l8), NINES, 8);
    check("zero64 late", 80'(l16), NINES, 16);

    a8 = 32'h9CB8_9CB8; b8 = 32'h68A8_1882;
    a16 = {2{a8}};      b16 = {2{b8}};
    #1;
    check("published 32-bit", 80'(l8), 80'(EX32), 8);
    check("published 64-bit", 80'(l16), {2{EX32}}, 16);

    repeat (2000) begin
      a8 = 32'(rand_bcd(8)); b8 = 32'(rand_bcd(8));
      a16 = rand_bcd(16);    b16 = rand_bcd(16);
      if ($urandom_range(15) == 0) b8 = a8;
      if ($urandom_range(15) == 0) b16 = a16;
      #1;
      check("decimal32", 80'(d8), dec_sub_word(64'(a8), 64'(b8), 8), 8);
      check("decimal64", 80'(d16), dec_sub_word(a16, b16, 16), 16);
      e = ref_sub_word(a16, b16, 16, 1'b0, eac);
      eac_seen[eac]++;
      check("model64", 80'(d16), e, 16);
      check("late model32", 80'(l8), ref_sub_word(64'(a8), 64'(b8), 8, 1'b1, eac), 8);
      check("late model64", 80'(l16), ref_sub_word(a16, b16, 16, 1'b1, eac), 16);
      a8 = 32'(rand_bits(8)); b8 = 32'(rand_bits(8));
      a16 = rand_bits(16);    b16 = rand_bits(16);
      #1;
      check("codes32", 80'(d8), ref_sub_word(64'(a8), 64'(b8), 8, 1'b0, eac), 8);
      check("codes64", 80'(d16), ref_sub_word(a16, b16, 16, 1'b0, eac), 16);
      check("late codes32", 80'(l8), ref_sub_word(64'(a8), 64'(b8), 8, 1'b1, eac), 8);
      check("late codes64", 80'(l16), ref_sub_word(a16, b16, 16, 1'b1, eac), 16);
    end
    checks++;
    if (eac_seen[0] == 0 || eac_seen[1] == 0) begin
      failures++;
      $display("FAIL end-around carry not seen both ways: %0d/%0d", eac_seen[0], eac_seen[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
