// Exhaustive test of the TR-gate nine's complementer: y = (9 - b) mod 16
// for all 16 codes, and y + b = 9 for the valid digits.
module tb_nines_comp_tr;
  logic [3:0] b, y;
  int checks = 0, failures = 0;

  nines_comp_tr dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      b = 4'(v);
      #1;
      checks++;
      if (int'(y) != (25 - v) % 16) begin
        failures++;
        $display("FAIL b=%0d y=%0d", b, y);
      end
      if (v <= 9) begin
        checks++;
        if (int'(y) + v != 9) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
