// Error-correction unit of the BCD digit adder. When corr is 1 the binary
// digit sum is not a valid BCD digit (or produced a binary carry) and 0110 is
// added to it; otherwise it passes unchanged. The +6 is done by a second
// 4-bit reversible CPA whose B operand is {0, corr, corr, 0}. The CPA's carry
// out is not needed: the decimal carry of the digit is the corr flag itself.
// Purely combinational.
module bcd_error_corr (
  input  logic [3:0] s_bin,
  input  logic       corr,
  output logic [3:0] s_bcd
);
  logic cpa_cout;
  rev_cpa4 u_add6 (
    .a   (s_bin),
    .b   (bcd_pkg::BCD_SIX & {4{corr}}),
    .cin (1'b0),
    .s   (s_bcd),
    .cout(cpa_cout)
  );
  logic unused_cout;
  assign unused_cout = cpa_cout;
endmodule
