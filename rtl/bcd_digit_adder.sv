// One-digit (4-bit) BCD adder: {cout, s} = a + b + cin in decimal.
// Stage 1 is a 4-bit reversible CPA giving the binary sum {c4, s_bin}.
// The 4x1 correction MUX decides whether that sum exceeds 9; if so the
// error-correction unit adds 0110 and a decimal carry is sent to the next
// digit. Inputs are assumed to be BCD digits (0..9).
// Purely combinational.
module bcd_digit_adder (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);
  logic [3:0] s_bin;
  logic       c4;
  logic       corr;

  rev_cpa4       u_cpa  (.a(a), .b(b), .cin(cin), .s(s_bin), .cout(c4));
  bcd_corr_mux4  u_mux  (.s(s_bin), .c4(c4), .corr(corr));
  bcd_error_corr u_corr (.s_bin(s_bin), .corr(corr), .s_bcd(s));

  assign cout = corr;
endmodule
