// Exhaustive self-checking test of the 4-bit reversible carry propagate
// adder: all 512 combinations of a, b and cin against integer addition.
module tb_rev_cpa4;
  int checks = 0, failures = 0;
  logic [3:0] a, b, s;
  logic       cin, cout;
  rev_cpa4 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      #1;
      checks++;
      if ({cout, s} !== 5'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL %0d+%0d+%0d -> %0d", a, b, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
