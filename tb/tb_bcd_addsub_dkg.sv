// Test of the DKG-gate BCD adder/subtractor at 8 and 16 digits, with the
// default carry entry and with LATE_CARRY = 1.
//  * Add mode: the published 32-bit and 64-bit example operands and their
//    per-digit results; random BCD words against per-digit decimal sums;
//    random codes against the bit-true digit model.
//  * Subtract mode: all-zero operands (01001 everywhere); the published
//    subtractor example on the LATE_CARRY units; random BCD words against
//    decimal arithmetic (default units); random codes against the model.
//  * The select pin is toggled on unchanged operands, both directions.
module tb_bcd_addsub_dkg;
  import bcd_ref_pkg::*;
  import bcd_pkg::*;

  logic [31:0] a8, b8;
  logic [63:0] a16, b16;
  logic        sub;
  digit_res_t [7:0]  r8, l8;
  digit_res_t [15:0] r16, l16;
  int checks = 0, failures = 0;
  bit eac;

  bcd_addsub_dkg                                    dut8   (.a(a8),  .b(b8),  .sub(sub), .res(r8));
  bcd_addsub_dkg #(.DIGITS(16))                     dut16  (.a(a16), .b(b16), .sub(sub), .res(r16));
  bcd_addsub_dkg #(.LATE_CARRY(1'b1))               late8  (.a(a8),  .b(b8),  .sub(sub), .res(l8));
  bcd_addsub_dkg #(.DIGITS(16), .LATE_CARRY(1'b1))  late16 (.a(a16), .b(b16), .sub(sub), .res(l16));

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

  localparam logic [39:0] ADD32 = {5'b10000, 5'b10000, 5'b10000, 5'b00010,
                                   5'b00000, 5'b10100, 5'b11010, 5'b11000};
  localparam logic [74:0] ADD64 = {5'b11000, 5'b11010, 5'b11010, 5'b01000, 5'b11110,
                                   5'b11010, 5'b11110, 5'b11100, 5'b11110, 5'b00010,
                                   5'b01000, 5'b11010, 5'b11010, 5'b11010, 5'b00010};
  localparam logic [39:0] SUB32 = {5'b10011, 5'b10011, 5'b00000, 5'b01010,
                                   5'b11000, 5'b10100, 5'b10011, 5'b10110};
  localparam logic [79:0] NINES = {16{5'b01001}};

  task automatic check_all(input string what);
    if (!sub) begin
      check({what, " add32"}, 80'(r8), ref_add_word(64'(a8), 64'(b8), 8), 8);
      check({what, " add64"}, 80'(r16), ref_add_word(a16, b16, 16), 16);
      check({what, " add32 late"}, 80'(l8), ref_add_word(64'(a8), 64'(b8), 8), 8);
      check({what, " add64 late"}, 80'(l16), ref_add_word(a16, b16, 16), 16);
    end else begin
      check({what, " sub32"}, 80'(r8), ref_sub_word(64'(a8), 64'(b8), 8, 1'b0, eac), 8);
      check({what, " sub64"}, 80'(r16), ref_sub_word(a16, b16, 16, 1'b0, eac), 16);
      check({what, " sub32 late"}, 80'(l8), ref_sub_word(64'(a8), 64'(b8), 8, 1'b1, eac), 8);
      check({what, " sub64 late"}, 80'(l16), ref_sub_word(a16, b16, 16, 1'b1, eac), 16);
    end
  endtask


  initial begin
    // add mode, published operands
    sub = 1'b0;
    a8 = 32'h9551_D1AB; b8 = 32'h1551_DDA7;
    a16 = 64'h89AA_4CAC_BC14_AAA1; b16 = a16;
    #1;
    check("published add32", 80'(r8), 80'(ADD32), 8);
    check("published add32 late", 80'(l8), 80'(ADD32), 8);
    check("published add64", 80'(r16), 80'(ADD64), 15);

    // subtract mode, zero and published operands
    sub = 1'b1;
    a8 = '0; b8 = '0; a16 = '0; b16 = '0;
    #1;
    check("zero sub32", 80'(r8), NINES, 8);
    check("zero sub64", 80'(r16), NINES, 16);
    a8 = 32'h9CB8_9CB8; b8 = 32'h68A8_1882;
    a16 = {2{a8}};      b16 = {2{b8}};
    #1;
    check("published sub32 late", 80'(l8), 80'(SUB32), 8);
    check("published sub64 late", 80'(l16), {2{SUB32}}, 16);

    repeat (1500) begin
      sub = 1'($urandom_range(1));
      a8 = 32'(rand_bcd(8)); b8 = 32'(rand_bcd(8));
      a16 = rand_bcd(16);    b16 = rand_bcd(16);
      #1;
      if (!sub) begin
        check("decimal add32", 80'(r8), dec_add_word(64'(a8), 64'(b8), 8), 8);
        check("decimal add64", 80'(r16), dec_add_word(a16, b16, 16), 16);
      end else begin
        check("decimal sub32", 80'(r8), dec_sub_word(64'(a8), 64'(b8), 8), 8);
        check("decimal sub64", 80'(r16), dec_sub_word(a16, b16, 16), 16);
      end
      check_all("bcd");
      sub = !sub;                       // same operands, other operation
      #1;
      check_all("toggled");
      a8 = 32'(rand_bits(8)); b8 = 32'(rand_bits(8));
      a16 = rand_bits(16);    b16 = rand_bits(16);
      #1;
      check_all("codes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
