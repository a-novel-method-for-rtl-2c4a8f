// One-digit stage-1 BCD subtraction cell: sm = a + (9 - b) + cin in decimal.
// The nine's complement of the subtrahend digit is formed and added to the
// minuend digit by the one-digit BCD adder; cout is the decimal carry to the
// next digit. Chained over a word and followed by the correction stage
// (bcd_sub_corr) this yields a - b. Purely combinational.
module bcd_digit_sub (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sm,
  output logic       cout
);
  logic [3:0] b9;
  nines_comp      u_n9  (.d(b), .n(b9));
  bcd_digit_adder u_add (.a(a), .b(b9), .cin(cin), .s(sm), .cout(cout));
endmodule
