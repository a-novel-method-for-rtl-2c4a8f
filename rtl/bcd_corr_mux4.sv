// Decimal-correction detector of the BCD digit adder, realised as a 4x1
// multiplexer. A 4-bit binary digit sum {c4, s} needs +6 correction when it
// exceeds 9: corr = c4 | s3.s2 | s3.s1.
// The select lines are {s3, s2}; the four data inputs are
//   00 -> c4, 01 -> c4, 10 -> c4 | s1, 11 -> 1.
// Each data input is gated by a Toffoli gate on its decoded select, so
// exactly one product term is non-zero and the OR of them is the output.
// Purely combinational. The 4x1 MUX structure follows the described design;
// the choice of select and data inputs is this design's own.
module bcd_corr_mux4 (
  input  logic [3:0] s,
  input  logic       c4,
  output logic       corr
);
  logic [3:0] sel_dec;   // one-hot decode of {s3, s2}
  logic [3:0] data;
  logic [3:0] term;
  logic [3:0] g_p, g_q;  // garbage (control copies) of the Toffoli gates

  assign sel_dec[0] = ~s[3] & ~s[2];
  assign sel_dec[1] = ~s[3] &  s[2];
  assign sel_dec[2] =  s[3] & ~s[2];
  assign sel_dec[3] =  s[3] &  s[2];

  assign data[0] = c4;
  assign data[1] = c4;
  assign data[2] = c4 | s[1];
  assign data[3] = 1'b1;

  for (genvar i = 0; i < 4; i++) begin : g_and
    toffoli_gate u_tg (.a(sel_dec[i]), .b(data[i]), .c(1'b0),
                       .p(g_p[i]), .q(g_q[i]), .r(term[i]));
  end

  assign corr = |term;

  logic unused_garbage;
  assign unused_garbage = ^{g_p, g_q, s[0]};
endmodule
