// End-to-end test of the top with every parameter at its default: the six
// units (Peres adders, TR subtractors, DKG adder/subtractors; 32 and 64 bits)
// driven together.
//  * The published example operands on the adders and the DKG units in add
//    mode, against the published per-digit results.
//  * Random valid BCD words on all six units against decimal arithmetic:
//    per-digit sums for addition, a + (10^n - 1 - b) + [a > b] for
//    subtraction.
//  * Counted events, each of which must occur at least once: a digit sum
//    corrected by +6, a carry passed from one subtract digit to the next, the
//    end-around carry at 1 (a > b) and at 0 (a < b), equal operands (all
//    nines), and the DKG select switched add->sub and sub->add.
module tb_bcd_reversible_top;
  import bcd_ref_pkg::*;
  import bcd_pkg::*;

  logic [31:0] add32_a, add32_b, sub32_a, sub32_b, dkg32_a, dkg32_b;
  logic [63:0] add64_a, add64_b, sub64_a, sub64_b, dkg64_a, dkg64_b;
  logic        dkg32_sub, dkg64_sub;
  digit_res_t [DIGITS_32-1:0] add32_sum, sub32_diff, dkg32_res;
  digit_res_t [DIGITS_64-1:0] add64_sum, sub64_diff, dkg64_res;

  int checks = 0, failures = 0;
  int n_fix = 0, n_chain = 0, n_eac1 = 0, n_eac0 = 0, n_equal = 0, n_to_sub = 0, n_to_add = 0;

  bcd_reversible_top dut (.*);

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

  // event counters, worked out from the operands
  task automatic count_add(input logic [63:0] a, input logic [63:0] b, input int n);
    for (int i = 0; i < n; i++) if (a[4*i +: 4] + b[4*i +: 4] > 9) n_fix++;
  endtask

  task automatic count_sub(input logic [63:0] a, input logic [63:0] b, input int n);
    longint unsigned av, bv;  // decimal values
    av = bcd2int(a, n);
    bv = bcd2int(b, n);
    if (av > bv) n_eac1++;
    else if (av < bv) n_eac0++;
    else n_equal++;
    // a digit with a_i = b_i (sum 9) that receives a carry must pass it on
    if (av > bv)
      for (int i = 1; i < n; i++)
        if (a[4*i +: 4] == b[4*i +: 4] &&
            (av % pow10(i)) + (pow10(n) - 1 - bv) % pow10(i) + 1 >= pow10(i)) n_chain++;
  endtask

  localparam logic [39:0] ADD32 = {5'b10000, 5'b10000, 5'b10000, 5'b00010,
                                   5'b00000, 5'b10100, 5'b11010, 5'b11000};
  localparam logic [74:0] ADD64 = {5'b11000, 5'b11010, 5'b11010, 5'b01000, 5'b11110,
                                   5'b11010, 5'b11110, 5'b11100, 5'b11110, 5'b00010,
                                   5'b01000, 5'b11010, 5'b11010, 5'b11010, 5'b00010};

  logic prev_sub;

  task automatic event_seen(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL never happened: %s", what);
    end
  endtask

  initial begin
    add32_a = 32'h9551_D1AB; add32_b = 32'h1551_DDA7;
    dkg32_a = add32_a;       dkg32_b = add32_b;      dkg32_sub = 1'b0;
    add64_a = 64'h89AA_4CAC_BC14_AAA1; add64_b = add64_a;
    dkg64_a = add64_a;       dkg64_b = add64_b;      dkg64_sub = 1'b0;
    sub32_a = '0; sub32_b = '0; sub64_a = '0; sub64_b = '0;
    #1;
    check("published add32", 80'(add32_sum), 80'(ADD32), 8);
    check("published add64", 80'(add64_sum), 80'(ADD64), 15);
    check("published dkg32 add", 80'(dkg32_res), 80'(ADD32), 8);
    check("published dkg64 add", 80'(dkg64_res), 80'(ADD64), 15);
    prev_sub = 1'b0;

    repeat (3000) begin
      add32_a = 32'(rand_bcd(8));  add32_b = 32'(rand_bcd(8));
      add64_a = rand_bcd(16);      add64_b = rand_bcd(16);
      sub32_a = 32'(rand_bcd(8));  sub32_b = 32'(rand_bcd(8));
      sub64_a = rand_bcd(16);      sub64_b = rand_bcd(16);
      dkg32_a = 32'(rand_bcd(8));  dkg32_b = 32'(rand_bcd(8));
      dkg64_a = rand_bcd(16);      dkg64_b = rand_bcd(16);
      // make equal operands and long carry runs likely
      case ($urandom_range(7))
        0: sub32_b = sub32_a;
        1: begin sub64_b = sub64_a; sub64_a[3:0] = 4'd9; sub64_b[3:0] = 4'd0; end
        2: dkg64_b = dkg64_a;
        default: ;
      endcase
      dkg32_sub = 1'($urandom_range(1));
      dkg64_sub = dkg32_sub;
      #1;
      if (dkg32_sub && !prev_sub) n_to_sub++;
      if (!dkg32_sub && prev_sub) n_to_add++;
      prev_sub = dkg32_sub;

      check("add32", 80'(add32_sum), dec_add_word(64'(add32_a), 64'(add32_b), 8), 8);
      check("add64", 80'(add64_sum), dec_add_word(add64_a, add64_b, 16), 16);
      check("sub32", 80'(sub32_diff), dec_sub_word(64'(sub32_a), 64'(sub32_b), 8), 8);
      check("sub64", 80'(sub64_diff), dec_sub_word(sub64_a, sub64_b, 16), 16);
      count_add(64'(add32_a), 64'(add32_b), 8);
      count_add(add64_a, add64_b, 16);
      count_sub(64'(sub32_a), 64'(sub32_b), 8);
      count_sub(sub64_a, sub64_b, 16);
      if (!dkg32_sub) begin
        check("dkg32 add", 80'(dkg32_res), dec_add_word(64'(dkg32_a), 64'(dkg32_b), 8), 8);
        check("dkg64 add", 80'(dkg64_res), dec_add_word(dkg64_a, dkg64_b, 16), 16);
        count_add(64'(dkg32_a), 64'(dkg32_b), 8);
      end else begin
        check("dkg32 sub", 80'(dkg32_res), dec_sub_word(64'(dkg32_a), 64'(dkg32_b), 8), 8);
        check("dkg64 sub", 80'(dkg64_res), dec_sub_word(dkg64_a, dkg64_b, 16), 16);
        count_sub(dkg64_a, dkg64_b, 16);
      end
    end

    $display("events: fix=%0d chain=%0d eac1=%0d eac0=%0d equal=%0d to_sub=%0d to_add=%0d",
             n_fix, n_chain, n_eac1, n_eac0, n_equal, n_to_sub, n_to_add);
    event_seen("decimal correction", n_fix);
    event_seen("subtract carry chain", n_chain);
    event_seen("end-around carry 1", n_eac1);
    event_seen("end-around carry 0", n_eac0);
    event_seen("equal operands", n_equal);
    event_seen("switch to subtract", n_to_sub);
    event_seen("switch to add", n_to_add);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
