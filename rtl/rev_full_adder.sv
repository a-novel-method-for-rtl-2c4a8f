// One-bit full adder built only from reversible gates.
// Sum:   two Feynman gates, s = a xor b xor cin.
// Carry: two Toffoli gates, cout = (a.b) xor (cin.(a xor b)), which equals the
//        majority of a, b and cin. The first Toffoli's target is a constant 0
//        ancilla; the copied control lines are garbage outputs and unused.
// Purely combinational. This gate arrangement is a choice of this design: the
// unit is described as Feynman plus URG gates, whose URG equations are not
// given, so the equivalent Feynman/Toffoli form is used.
module rev_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic a_g, p1, cin_g, b_g1, a_g2, ab, p_g, c_g2;

  feynman_gate u_fg1 (.a(a),   .b(b),   .p(a_g),   .q(p1));     // p1 = a^b
  feynman_gate u_fg2 (.a(cin), .b(p1),  .p(cin_g), .q(s));      // s  = a^b^cin
  toffoli_gate u_tg1 (.a(a),   .b(b),   .c(1'b0),  .p(a_g2), .q(b_g1), .r(ab));
  toffoli_gate u_tg2 (.a(p1),  .b(cin), .c(ab),    .p(p_g),  .q(c_g2), .r(cout));

  // Garbage outputs of the reversible gates: only the copies of the inputs.
  logic unused_garbage;
  assign unused_garbage = ^{a_g, cin_g, b_g1, a_g2, p_g, c_g2};
endmodule
