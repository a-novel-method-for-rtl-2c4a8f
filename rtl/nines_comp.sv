// Nine's complement of one BCD digit: n = 9 - d for d in 0..9.
//   n0 = ~d0, n1 = d1, n2 = d2 xor d1, n3 = ~(d3 | d2 | d1)
// Inversions are Feynman gates with a constant-1 control; n2 is a Feynman
// gate. Purely combinational. Codes 10..15 are not BCD and give unspecified
// (but deterministic) results.
module nines_comp (
  input  logic [3:0] d,
  output logic [3:0] n
);
  logic g0, g2, g3;
  feynman_gate u_inv0 (.a(1'b1), .b(d[0]), .p(g0), .q(n[0]));
  feynman_gate u_x21  (.a(d[1]), .b(d[2]), .p(g2), .q(n[2]));
  feynman_gate u_inv3 (.a(1'b1), .b(d[3] | d[2] | d[1]), .p(g3), .q(n[3]));
  assign n[1] = d[1];

  logic unused_garbage;
  assign unused_garbage = ^{g0, g2, g3};
endmodule
