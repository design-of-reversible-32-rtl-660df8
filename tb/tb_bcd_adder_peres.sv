// Test of the N-digit Peres-gate BCD adder at 8 digits (default, 32-bit) and
// 16 digits (64-bit).
//  * The published 32-bit and 64-bit example operands, whose per-digit results
//    are listed as constants below (digit 1 first).
//  * Random valid BCD words against per-digit decimal sums.
//  * Random 4-bit codes (including 10..15) against the bit-true digit model.
module tb_bcd_adder_peres;
  import bcd_ref_pkg::*;
  import bcd_pkg::*;

  logic [31:0] a8, b8;
  logic [63:0] a16, b16;
  digit_res_t [7:0]  s8;
  digit_res_t [15:0] s16;
  int checks = 0, failures = 0;

  bcd_adder_peres                 dut8  (.a(a8),  .b(b8),  .sum(s8));
  bcd_adder_peres #(.DIGITS(16))  dut16 (.a(a16), .b(b16), .sum(s16));

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

  // published results, sum1 in the low 5 bits
  localparam logic [39:0] EX32 = {5'b10000, 5'b10000, 5'b10000, 5'b00010,
                                  5'b00000, 5'b10100, 5'b11010, 5'b11000};
  localparam logic [74:0] EX64 = {5'b11000, 5'b11010, 5'b11010, 5'b01000, 5'b11110,
                                  5'b11010, 5'b11110, 5'b11100, 5'b11110, 5'b00010,
                                  5'b01000, 5'b11010, 5'b11010, 5'b11010, 5'b00010};

  initial begin
    a8 = '0; b8 = '0; a16 = '0; b16 = '0;
    #1;
    check("zero32", 80'(s8), '0, 8);
    check("zero64", 80'(s16), '0, 16);

    a8 = 32'h9551_D1AB; b8 = 32'h1551_DDA7;
    a16 = 64'h89AA_4CAC_BC14_AAA1; b16 = a16;
    #1;
    check("published 32-bit", 80'(s8), 80'(EX32), 8);
    check("published 64-bit", 80'(s16), 80'(EX64), 15);

    repeat (2000) begin
      a8 = 32'(rand_bcd(8)); b8 = 32'(rand_bcd(8));
      a16 = rand_bcd(16);    b16 = rand_bcd(16);
      #1;
      check("decimal32", 80'(s8), dec_add_word(64'(a8), 64'(b8), 8), 8);
      check("decimal64", 80'(s16), dec_add_word(a16, b16, 16), 16);
      a8 = 32'(rand_bits(8)); b8 = 32'(rand_bits(8));
      a16 = rand_bits(16);    b16 = rand_bits(16);
      #1;
      check("codes32", 80'(s8), ref_add_word(64'(a8), 64'(b8), 8), 8);
      check("codes64", 80'(s16), ref_add_word(a16, b16, 16), 16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
