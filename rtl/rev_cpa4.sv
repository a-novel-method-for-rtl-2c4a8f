// 4-bit carry propagate (ripple-carry) binary adder of reversible full adders.
// {cout, s} = a + b + cin. The carry ripples from bit 0 to bit 3 through four
// rev_full_adder cells, as in the "CPA fashion" of the BCD digit adder.
// Purely combinational; delay is four full-adder carry steps.
module rev_cpa4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);
  logic [4:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < 4; i++) begin : g_fa
    rev_full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
  end
  assign cout = c[4];
endmodule
