// BCD add-subtract unit: an eight-digit (32-bit) BCD adder and an eight-digit
// BCD subtractor working in parallel on the same operands, in a two-stage
// pipeline that accepts one operation per clock.
//
//   cycle 0  a, b, cin, in_valid presented.
//            adder: sum = a + b + cin (ripple of decimal digit adders).
//            subtractor stage 1: sm = a + 9's(b).
//   edge 1   sum and {sm, carry} registered (stage register).
//   cycle 1  subtractor correction: end-around carry or nine's complement.
//   edge 2   sum, df, br registered; out_valid = 1 during cycle 2.
//
// Outputs: sum = {decimal carry, 8 BCD digits} = a + b + cin;
//          df  = |a - b| in BCD; br = 1 when a < b.
// The adder and subtractor structure and the stage-1/correction split follow
// the described design; the register placement, the valid bit, reset
// (synchronous, active low, clears the valid bits and data registers) and
// running both operations every cycle are this design's own choices.
// Operands must be BCD: an assertion reports any digit above 9.
module bcd_addsub_unit #(
  parameter int unsigned DIGITS = bcd_pkg::DIGITS_DEFAULT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  input  logic                cin,
  output logic                out_valid,
  output logic [4*DIGITS:0]   sum,
  output logic [4*DIGITS-1:0] df,
  output logic                br
);
  localparam int unsigned W = 4 * DIGITS;

  // ---------------- stage 1 ----------------
  logic [W:0]   sum_c;
  logic [W:0]   sum_s1;
  logic         v_s1;
  logic [W-1:0] sm_unused;
  logic [W-1:0] df_c;
  logic         br_c;

  bcd_adder #(.DIGITS(DIGITS)) u_add (.a(a), .b(b), .cin(cin), .sum(sum_c));

  // Stage register of the subtractor sits inside it (PIPE_STAGES = 1).
  bcd_subtractor #(.DIGITS(DIGITS), .PIPE_STAGES(1)) u_sub (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .sm(sm_unused), .df(df_c), .br(br_c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_s1   <= 1'b0;
      sum_s1 <= '0;
    end else begin
      v_s1   <= in_valid;
      sum_s1 <= sum_c;
    end
  end

  // ---------------- stage 2 (output register) ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum       <= '0;
      df        <= '0;
      br        <= 1'b0;
    end else begin
      out_valid <= v_s1;
      sum       <= sum_s1;
      df        <= df_c;
      br        <= br_c;
    end
  end

  logic unused_sm;
  assign unused_sm = ^sm_unused;

  // ---------------- checks ----------------
  function automatic logic is_bcd(input logic [W-1:0] x);
    logic ok;
    ok = 1'b1;
    for (int i = 0; i < DIGITS; i++)
      if (x[4*i +: 4] > 4'd9) ok = 1'b0;
    return ok;
  endfunction

  a_bcd_inputs : assert property (@(posedge clk) disable iff (!rst_n)
                                  in_valid |-> (is_bcd(a) && is_bcd(b)))
    else $error("bcd_addsub_unit: operand digit above 9");
endmodule
