// Exhaustive self-checking test of the Toffoli gate: p = a, q = b,
// r = (a and b) xor c, and the gate is its own inverse.
module tb_toffoli_gate;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r, p2, q2, r2;
  toffoli_gate dut  (.a(a), .b(b), .c(c), .p(p),  .q(q),  .r(r));
  toffoli_gate dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if (p !== a || q !== b || r !== ((a && b) != c)) begin
        failures++;
        $display("FAIL abc=%b%b%b -> pqr=%b%b%b", a, b, c, p, q, r);
      end
      checks++;
      if ({p2, q2, r2} !== {a, b, c}) begin
        failures++;
        $display("FAIL not reversible for abc=%b%b%b", a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
