// Exhaustive test of the 5-bit incrementer dkg_inc5: y = (x + cin) mod 32 for
// all 64 input patterns.
module tb_dkg_inc5;
  logic [4:0] x, y;
  logic       cin;
  int checks = 0, failures = 0;

  dkg_inc5 dut (.*);

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
