// Toffoli (CCNOT) gate, the 3x3 reversible gate used for the carry and
// correction logic. Outputs: p = a, q = b, r = (a and b) xor c.
// Purely combinational. The equations are the standard definition of the gate.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
