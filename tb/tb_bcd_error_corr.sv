// Exhaustive self-checking test of the +0110 error-correction unit: with
// corr = 1 the output is (s_bin + 6) mod 16, with corr = 0 it is s_bin.
module tb_bcd_error_corr;
  int checks = 0, failures = 0;
  logic [3:0] s_bin, s_bcd;
  logic       corr;
  bcd_error_corr dut (.s_bin(s_bin), .corr(corr), .s_bcd(s_bcd));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {corr, s_bin} = 5'(v);
      #1;
      checks++;
      if (s_bcd !== 4'((int'(s_bin) + (corr ? 6 : 0)) % 16)) begin
        failures++;
        $display("FAIL s_bin=%0d corr=%b -> %0d", s_bin, corr, s_bcd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
