// Reference models for the BCD unit testbenches.
//
// Two kinds of model, both written from arithmetic rather than from gates:
//  * bit-true digit models (ref_digit_add, ref_sub_word, ref_add_word) that
//    state the documented per-digit behaviour in plain integer arithmetic,
//    including what happens to codes 10..15;
//  * decimal models (dec_*) that work on the decimal values of valid BCD
//    words, so the digit models themselves are checked against ordinary
//    decimal addition and subtraction.
package bcd_ref_pkg;

  // {carry, digit} of one digit adder: 5-bit sum, +6 when above 9, 5-bit wrap
  function automatic logic [4:0] ref_digit_add(input int unsigned a, input int unsigned b);
    int unsigned s;
    s = a + b;
    if (s > 9) s = s + 6;
    return 5'(s % 32);
  endfunction

  // nine's complement as a 4-bit difference
  function automatic int unsigned ref_nine(input int unsigned b);
    return (9 + 16 - b) % 16;
  endfunction

  // independent per-digit adder word; digit i of the result in r[5*i +: 5]
  function automatic logic [79:0] ref_add_word(input logic [63:0] a, input logic [63:0] b, input int n);
    logic [79:0] r = '0;
    for (int i = 0; i < n; i++) r[5*i +: 5] = ref_digit_add(int'(a[4*i +: 4]), int'(b[4*i +: 4]));
    return r;
  endfunction

  // one digit adder with carry-in: 5-bit sum, +6 when above 9, 5-bit wrap
  function automatic logic [4:0] ref_digit_add_c(input int unsigned a, input int unsigned b,
                                                 input int unsigned c);
    int unsigned s;
    s = a + b + c;
    if (s > 9) s = s + 6;
    return 5'(s % 32);
  endfunction

  // one subtract digit with carry-in c; late = carry added after correction
  function automatic logic [4:0] ref_sub_digit(input int unsigned a, input int unsigned b,
                                               input int unsigned c, input bit late);
    if (late) return 5'((int'(ref_digit_add(a, ref_nine(b))) + c) % 32);
    return ref_digit_add_c(a, ref_nine(b), c);
  endfunction

  // nine's-complement subtraction with digit carry chain and end-around carry
  function automatic logic [79:0] ref_sub_word(input logic [63:0] a, input logic [63:0] b, input int n,
                                               input bit late, output bit eac);
    logic [79:0] r = '0;
    logic [4:0] d;
    int unsigned c;
    c = 0;                                   // chain from 0 finds the top carry
    for (int i = 0; i < n; i++) begin
      d = ref_sub_digit(int'(a[4*i +: 4]), int'(b[4*i +: 4]), c, late);
      c = int'(d[4]);
    end
    eac = bit'(c);
    for (int i = 0; i < n; i++) begin
      r[5*i +: 5] = ref_sub_digit(int'(a[4*i +: 4]), int'(b[4*i +: 4]), c, late);
      c = int'(r[5*i + 4]);
    end
    return r;
  endfunction

  // ---- decimal models, valid BCD only ----
  function automatic longint unsigned bcd2int(input logic [63:0] x, input int n);
    longint unsigned v = 0;
    for (int i = n - 1; i >= 0; i--) v = v * 10 + 64'(x[4*i +: 4]);
    return v;
  endfunction

  function automatic longint unsigned pow10(input int n);
    longint unsigned v = 1;
    for (int i = 0; i < n; i++) v = v * 10;
    return v;
  endfunction

  // per-digit decimal sums, no carries between digits
  function automatic logic [79:0] dec_add_word(input logic [63:0] a, input logic [63:0] b, input int n);
    logic [79:0] r = '0;
    int unsigned s;
    for (int i = 0; i < n; i++) begin
      s = int'(a[4*i +: 4]) + int'(b[4*i +: 4]);
      r[5*i +: 5] = {1'(s / 10), 4'(s % 10)};
    end
    return r;
  endfunction

  // A + (10^n - 1 - B) + eac, eac = 1 when A > B; digit i of the sum with the
  // decimal carry out of digit i in bit 4
  function automatic logic [79:0] dec_sub_word(input logic [63:0] a, input logic [63:0] b, input int n);
    logic [79:0] r = '0;
    longint unsigned av, cv, e, m;
    av = bcd2int(a, n);
    cv = pow10(n) - 1 - bcd2int(b, n);
    e  = (av > bcd2int(b, n)) ? 1 : 0;
    for (int i = 0; i < n; i++) begin
      m = pow10(i + 1);
      r[5*i + 4]  = ((av % m) + (cv % m) + e) >= m;
      r[5*i +: 4] = 4'((((av % m) + (cv % m) + e) % m) / pow10(i));
    end
    return r;
  endfunction

  function automatic logic [63:0] rand_bcd(input int n);
    logic [63:0] x = '0;
    for (int i = 0; i < n; i++) x[4*i +: 4] = 4'($urandom_range(9));
    return x;
  endfunction

  function automatic logic [63:0] rand_bits(input int n);
    logic [63:0] x = {$urandom, $urandom};
    if (n < 16) x = x & ((64'd1 << (4 * n)) - 1);
    return x;
  endfunction

endpackage
