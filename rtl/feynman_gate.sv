// Feynman (CNOT) gate, the 2x2 reversible gate used throughout the unit.
// Outputs: p = a (control copied through), q = a xor b (target).
// Purely combinational. The equations are the standard definition of the gate.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
