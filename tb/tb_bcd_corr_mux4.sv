// Exhaustive self-checking test of the decimal-correction detector: for every
// 5-bit binary digit sum {c4, s} the flag must be 1 exactly when the value
// exceeds 9.
module tb_bcd_corr_mux4;
  int checks = 0, failures = 0;
  logic [3:0] s;
  logic       c4, corr;
  bcd_corr_mux4 dut (.s(s), .c4(c4), .corr(corr));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {c4, s} = 5'(v);
      #1;
      checks++;
      if (corr !== (v > 9)) begin
        failures++;
        $display("FAIL binary sum %0d -> corr=%b", v, corr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
