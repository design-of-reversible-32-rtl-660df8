// Exhaustive test of one DKG digit slice: all digit pairs, both operations,
// carry-in 0 and 1. Add mode must match the digit adder model on a + b + cin;
// subtract mode the model on a + (9 - b) + cin, and for valid digits the
// decimal value of a + 9 - b + cin.
module tb_dkg_digit_addsub;
  import bcd_ref_pkg::*;
  logic [3:0] a, b;
  logic       sub, cin;
  logic [4:0] res;
  logic [4:0] exp_res;
  int checks = 0, failures = 0;

  dkg_digit_addsub dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      {sub, cin, a, b} = 10'(v);
      #1;
      exp_res = sub ? ref_sub_digit(int'(a), int'(b), int'(cin), 1'b0)
                    : ref_digit_add_c(int'(a), int'(b), int'(cin));
      checks++;
      if (res !== exp_res) begin
        failures++;
        $display("FAIL sub=%b a=%h b=%h cin=%b res=%b exp=%b", sub, a, b, cin, res, exp_res);
      end
      if (sub && a <= 9 && b <= 9) begin
        checks++;
        if (res[3:0] != (a + 9 - b + cin) % 10 || res[4] != ((a + 9 - b + cin) >= 10))
          failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
