// Exhaustive self-checking test of the nine's complement unit for d = 0..9.
module tb_nines_comp;
  int checks = 0, failures = 0;
  logic [3:0] d, n;
  nines_comp dut (.d(d), .n(n));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 10; v++) begin
      d = 4'(v);
      #1;
      checks++;
      if (n !== 4'(9 - v)) begin
        failures++;
        $display("FAIL 9's(%0d) -> %0d", v, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
