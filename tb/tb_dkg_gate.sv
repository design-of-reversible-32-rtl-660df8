// Exhaustive test of the DKG gate: all 16 input patterns. With a = 0 {r, s}
// must be the 2-bit sum b + c + d; with a = 1, s the difference and r the
// borrow of b - c - d; q must be c (a = 0) or ~d (a = 1); p = b; and the 16
// output patterns must all differ (reversibility).
module tb_dkg_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit [15:0] seen = '0;
  int diff;

  dkg_gate dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      checks++;
      if (!a) begin
        if ({r, s} !== 2'(int'(b) + int'(c) + int'(d))) failures++;
      end else begin
        diff = int'(b) - int'(c) - int'(d);
        if (s !== 1'(diff) || r !== (diff < 0)) failures++;
      end
      checks++;
      if (p !== b || q !== (a ? !d : c)) begin
        failures++;
        $display("FAIL abcd=%b pqrs=%b%b%b%b", {a, b, c, d}, p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (seen !== 16'hFFFF) begin
      failures++;
      $display("FAIL not reversible: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
