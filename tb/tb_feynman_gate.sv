// Exhaustive self-checking test of the Feynman gate: p = a, q = a xor b,
// and the gate is its own inverse (applying it twice restores the inputs).
module tb_feynman_gate;
  int checks = 0, failures = 0;
  logic a, b, p, q, p2, q2;
  feynman_gate dut  (.a(a), .b(b), .p(p),  .q(q));
  feynman_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL a=%b b=%b -> p=%b q=%b", a, b, p, q);
      end
      checks++;
      if (p2 !== a || q2 !== b) begin
        failures++;
        $display("FAIL not reversible for a=%b b=%b", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
