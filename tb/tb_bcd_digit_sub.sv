// Exhaustive self-checking test of the stage-1 subtraction cell:
// sm/cout must equal the decimal digit and carry of a + (9 - b) + cin.
module tb_bcd_digit_sub;
  int checks = 0, failures = 0;
  logic [3:0] a, b, sm;
  logic       cin, cout;
  int         tot;
  bcd_digit_sub dut (.a(a), .b(b), .cin(cin), .sm(sm), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 10; x++)
      for (int y = 0; y < 10; y++)
        for (int c = 0; c < 2; c++) begin
          a = 4'(x); b = 4'(y); cin = 1'(c);
          #1;
          tot = x + (9 - y) + c;
          checks++;
          if (sm !== 4'(tot % 10) || cout !== (tot >= 10)) begin
            failures++;
            $display("FAIL a=%0d b=%0d cin=%0d -> sm %0d carry %b", x, y, c, sm, cout);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
