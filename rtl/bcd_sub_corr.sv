// Per-digit correction of the BCD subtractor (nine's-complement method).
// pos = 1 (stage 1 carried out of the word, a > b): the end-around carry is
//   added, d = sm + cin in decimal, carry passed on through cout; the least
//   significant digit gets cin = 1.
// pos = 0 (a <= b): the result is negative and its magnitude is the nine's
//   complement of the stage-1 digit, d = 9 - sm; cout = 0.
// The conditional choice between the two is the conditional (controlled)
// gate of the correction block, built here as a 2:1 select.
// Purely combinational.
module bcd_sub_corr (
  input  logic [3:0] sm,
  input  logic       pos,
  input  logic       cin,
  output logic [3:0] d,
  output logic       cout
);
  logic [3:0] inc, n9;
  logic       inc_c;
  bcd_digit_adder u_inc (.a(sm), .b(4'd0), .cin(cin & pos), .s(inc), .cout(inc_c));
  nines_comp      u_n9  (.d(sm), .n(n9));
  assign d    = pos ? inc : n9;
  assign cout = pos & inc_c;
endmodule
