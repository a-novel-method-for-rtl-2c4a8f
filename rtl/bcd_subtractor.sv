// Multi-digit BCD subtractor (default eight digits), nine's-complement method.
// Stage 1: every digit of b is nine's-complemented and added to a by a chain
//   of one-digit BCD adders (carry in 0): sm = a + (10^DIGITS - 1 - b).
//   pos, the carry out of the top digit, is 1 exactly when a > b.
// Correction: pos = 1 -> df = sm + 1 (end-around carry rippled through a
//   second chain of digit adders), br = 0.
//   pos = 0 -> df = nine's complement of sm = b - a, br = 1 unless a == b
//   (then sm is all nines, df = 0, and br is cleared so zero is not negative).
// PIPE_STAGES = 0: purely combinational, clk and rst_n unused.
// PIPE_STAGES = 1: sm and pos are registered between stage 1 and the
//   correction, so df and br follow a and b by one clock. The register holds
//   data only; rst_n clears it to zero.
// The stage-1 / correction split follows the described unit; the
// end-around-carry rule, the a == b handling and the optional register are
// this design's own choices.
module bcd_subtractor #(
  parameter int unsigned DIGITS      = bcd_pkg::DIGITS_DEFAULT,
  parameter int unsigned PIPE_STAGES = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  output logic [4*DIGITS-1:0] sm,
  output logic [4*DIGITS-1:0] df,
  output logic                br
);
  // ---------------- stage 1: a + 9's(b) ----------------
  logic [DIGITS:0] c;
  assign c[0] = 1'b0;
  for (genvar i = 0; i < DIGITS; i++) begin : g_s1
    bcd_digit_sub u_ds (
      .a   (a[4*i +: 4]),
      .b   (b[4*i +: 4]),
      .cin (c[i]),
      .sm  (sm[4*i +: 4]),
      .cout(c[i+1])
    );
  end

  // ---------------- optional pipeline register ----------------
  logic [4*DIGITS-1:0] sm_q;
  logic                pos_q;
  if (PIPE_STAGES != 0) begin : g_pipe
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        sm_q  <= '0;
        pos_q <= 1'b0;
      end else begin
        sm_q  <= sm;
        pos_q <= c[DIGITS];
      end
    end
  end else begin : g_comb
    assign sm_q  = sm;
    assign pos_q = c[DIGITS];
    logic unused_clk;
    assign unused_clk = clk ^ rst_n;
  end

  // ---------------- correction ----------------
  logic [DIGITS:0] e;            // end-around carry chain
  logic [DIGITS-1:0] all9;       // digit i of sm_q is 9
  assign e[0] = 1'b1;
  for (genvar i = 0; i < DIGITS; i++) begin : g_cor
    bcd_sub_corr u_cr (
      .sm  (sm_q[4*i +: 4]),
      .pos (pos_q),
      .cin (e[i]),
      .d   (df[4*i +: 4]),
      .cout(e[i+1])
    );
    assign all9[i] = (sm_q[4*i +: 4] == 4'd9);
  end
  assign br = ~pos_q & ~(&all9);

  logic unused_e;
  assign unused_e = e[DIGITS];
endmodule
