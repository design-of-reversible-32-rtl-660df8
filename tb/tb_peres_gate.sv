// Exhaustive test of the Peres gate: all 8 input patterns against the gate's
// equations, the half-adder reading with c = 0, and reversibility (the 8
// output patterns are all different).
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen = '0;

  peres_gate dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (p !== a || q !== (a != b) || r !== ((a && b) != c)) begin
        failures++;
        $display("FAIL abc=%b pqr=%b%b%b", {a, b, c}, p, q, r);
      end
      if (!c) begin
        checks++;
        if ({r, q} !== 2'(a + b)) begin
          failures++;
          $display("FAIL half adder a=%b b=%b", a, b);
        end
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL not reversible: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
