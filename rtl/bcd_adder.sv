// Multi-digit BCD adder (default eight digits, a 32-bit BCD word).
// DIGITS one-digit BCD adders are cascaded with the decimal carry rippling
// from the least to the most significant digit. sum = {carry out, digits},
// so sum is 4*DIGITS+1 bits wide, matching a 33-bit result for 8 digits.
// Purely combinational: the result is valid one carry-ripple delay after a,
// b or cin change. Inputs must be valid BCD.
module bcd_adder #(
  parameter int unsigned DIGITS = bcd_pkg::DIGITS_DEFAULT
) (
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  input  logic                cin,
  output logic [4*DIGITS:0]   sum
);
  logic [DIGITS:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < DIGITS; i++) begin : g_dig
    bcd_digit_adder u_dig (
      .a   (a[4*i +: 4]),
      .b   (b[4*i +: 4]),
      .cin (c[i]),
      .s   (sum[4*i +: 4]),
      .cout(c[i+1])
    );
  end
  assign sum[4*DIGITS] = c[DIGITS];
endmodule
