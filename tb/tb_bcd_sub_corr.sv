// Exhaustive self-checking test of the per-digit subtraction correction:
// pos = 1: d/cout = decimal digit/carry of sm + cin;
// pos = 0: d = 9 - sm, cout = 0.
module tb_bcd_sub_corr;
  int checks = 0, failures = 0;
  logic [3:0] sm, d;
  logic       pos, cin, cout;
  int         exp_d, exp_c;
  bcd_sub_corr dut (.sm(sm), .pos(pos), .cin(cin), .d(d), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 10; x++)
      for (int p = 0; p < 2; p++)
        for (int c = 0; c < 2; c++) begin
          sm = 4'(x); pos = 1'(p); cin = 1'(c);
          #1;
          if (p == 1) begin
            exp_d = (x + c) % 10;
            exp_c = (x + c) / 10;
          end else begin
            exp_d = 9 - x;
            exp_c = 0;
          end
          checks++;
          if (d !== 4'(exp_d) || cout !== 1'(exp_c)) begin
            failures++;
            $display("FAIL sm=%0d pos=%0d cin=%0d -> d=%0d cout=%b", x, p, c, d, cout);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
