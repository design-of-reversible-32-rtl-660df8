// Exhaustive test of one Peres-gate BCD digit adder: all 256 digit pairs with
// carry-in 0 and 1 against the bit-true digit model, plus the decimal value
// for valid digits ({carry, digit} of a + b + cin).
module tb_bcd_digit_adder_peres;
  import bcd_ref_pkg::*;
  logic [3:0] a, b;
  logic       cin;
  logic [4:0] sum;
  int checks = 0, failures = 0;

  bcd_digit_adder_peres dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin, a, b} = 9'(v);
      #1;
      checks++;
      if (sum !== ref_digit_add_c(int'(a), int'(b), int'(cin))) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b sum=%b", a, b, cin, sum);
      end
      if (a <= 9 && b <= 9) begin
        checks++;
        if (sum[3:0] != (a + b + cin) % 10 || sum[4] != ((a + b + cin) >= 10)) begin
          failures++;
          $display("FAIL decimal a=%0d b=%0d cin=%b sum=%b", a, b, cin, sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
