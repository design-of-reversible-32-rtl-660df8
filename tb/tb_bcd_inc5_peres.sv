// Exhaustive test of the 5-bit incrementer bcd_inc5_peres: y = (x + cin) mod 32 for
// all 64 input patterns.
module tb_bcd_inc5_peres;
  logic [4:0] x, y;
  logic       cin;
  int checks = 0, failures = 0;

  bcd_inc5_peres dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {cin, x} = 6'(v);
      #1;
      checks++;
      if (int'(y) != (int'(x) + int'(cin)) % 32) begin
        failures++;
        $display("FAIL x=%0d cin=%b y=%0d", x, cin, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
