// Exhaustive self-checking test of the one-digit BCD adder: all 200 BCD
// combinations of a, b (0..9) and cin, against decimal addition.
module tb_bcd_digit_adder;
  int checks = 0, failures = 0;
  logic [3:0] a, b, s;
  logic       cin, cout;
  int         tot;
  bcd_digit_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

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
          tot = x + y + c;
          checks++;
          if (s !== 4'(tot % 10) || cout !== (tot >= 10)) begin
            failures++;
            $display("FAIL %0d+%0d+%0d -> digit %0d carry %b", x, y, c, s, cout);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
