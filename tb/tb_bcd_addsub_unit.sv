// End-to-end self-checking test of the BCD add-subtract unit at its default
// size (eight digits). Operations stream through the two-stage pipeline, one
// per clock, with random gaps; every result is compared with integer decimal
// arithmetic and must appear exactly two clocks after its operands.
// Counted mechanisms (each must occur at least once):
//   digit correction (+6) in the adder, adder carry out, subtraction with
//   end-around carry (a > b), subtraction with nine's-complement correction
//   (a < b), equal operands (zero difference), back-to-back operations,
//   pipeline bubbles, and a reset in the middle of traffic.
module tb_bcd_addsub_unit;
  localparam int unsigned DIGITS  = 8;
  localparam longint      MOD     = 64'd100000000;   // 10^DIGITS
  localparam int unsigned LATENCY = 2;
  localparam int unsigned N_OPS   = 5000;

  typedef struct {
    longint x, y;
    bit     c;
    int     cycle;
  } op_t;

  int checks = 0, failures = 0;
  int n_digit_corr = 0, n_add_carry = 0, n_end_around = 0, n_nines_corr = 0;
  int n_equal = 0, n_back_to_back = 0, n_bubble = 0, n_reset = 0;
  int cycle = 0;
  op_t pending[$];

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, cin = 1'b0;
  logic [4*DIGITS-1:0] a = '0, b = '0;
  logic out_valid;
  logic [4*DIGITS:0]   sum;
  logic [4*DIGITS-1:0] df;
  logic                br;

  bcd_addsub_unit dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .cin(cin),
    .out_valid(out_valid), .sum(sum), .df(df), .br(br)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [4*DIGITS-1:0] to_bcd(input longint v);
    logic [4*DIGITS-1:0] r;
    for (int i = 0; i < DIGITS; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  // Uniform-enough random number in 0 .. MOD-1 (63 random bits, reduced).
  function automatic longint rand_val();
    longint r;
    r = longint'({1'b0, 31'($urandom), 32'($urandom)});
    return r % MOD;
  endfunction

  function automatic bit any_digit_corr(input longint x, input longint y, input bit c);
    int carry = int'(c);
    bit hit = 0;
    for (int i = 0; i < DIGITS; i++) begin
      int t = int'(x % 10) + int'(y % 10) + carry;
      if (t > 9) hit = 1;
      carry = (t > 9) ? 1 : 0;
      x = x / 10; y = y / 10;
    end
    return hit;
  endfunction

  // Scoreboard: compare every output with the oldest pending operation.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      op_t o;
      longint tot, mag;
      checks++;
      if (pending.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        o = pending.pop_front();
        tot = o.x + o.y + longint'(o.c);
        mag = (o.x >= o.y) ? o.x - o.y : o.y - o.x;
        if (cycle - o.cycle != LATENCY) begin
          failures++;
          $display("FAIL latency %0d cycles, expected %0d", cycle - o.cycle, LATENCY);
        end
        if (sum !== {1'(tot >= MOD), to_bcd(tot % MOD)} || df !== to_bcd(mag)
            || br !== (o.x < o.y)) begin
          failures++;
          $display("FAIL %0d,%0d,%0d -> sum %h df %h br %b", o.x, o.y, o.c, sum, df, br);
        end
        if (any_digit_corr(o.x, o.y, o.c)) n_digit_corr++;
        if (tot >= MOD)  n_add_carry++;
        if (o.x > o.y)   n_end_around++;
        if (o.x < o.y)   n_nines_corr++;
        if (o.x == o.y)  n_equal++;
      end
    end
  end

  task automatic issue(input longint x, input longint y, input bit c, input bit prev_valid);
    @(negedge clk);
    in_valid = 1'b1; a = to_bcd(x); b = to_bcd(y); cin = c;
    pending.push_back('{x: x, y: y, c: c, cycle: cycle});
    if (prev_valid) n_back_to_back++;
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0;
    a = to_bcd(rand_val());   // ignored data
    n_bubble++;
  endtask

  initial begin
    repeat (20 * N_OPS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit last_valid;
    longint x, y;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    last_valid = 0;
    issue(99999999, 1, 0, last_valid);        last_valid = 1;
    issue(12345678, 12345678, 1, last_valid);
    issue(3, 50000000, 0, last_valid);
    issue(50000000, 3, 1, last_valid);
    for (int i = 0; i < N_OPS; i++) begin
      if ($urandom % 5 == 0) begin
        idle();
        last_valid = 0;
      end
      x = rand_val();
      case ($urandom % 4)
        0: y = x;                                          // equal operands
        1: y = (x + (longint'($urandom) % 5)) % MOD;         // close operands
        default: y = rand_val();
      endcase
      issue(x, y, 1'($urandom), last_valid);
      last_valid = 1;
      if (i == N_OPS / 2) begin
        // Reset with operations in flight: they must be dropped.
        @(negedge clk);
        in_valid = 1'b0;
        rst_n = 1'b0;
        pending.delete();
        n_reset++;
        @(negedge clk);
        checks++;
        if (out_valid !== 1'b0) begin
          failures++;
          $display("FAIL out_valid high during reset");
        end
        rst_n = 1'b1;
        last_valid = 0;
      end
    end
    idle();
    repeat (LATENCY + 2) @(negedge clk);
    checks++;
    if (pending.size() != 0) begin
      failures++;
      $display("FAIL %0d operations never came out", pending.size());
    end
    $display("mechanisms: digit_corr=%0d add_carry=%0d end_around=%0d nines_corr=%0d equal=%0d back_to_back=%0d bubble=%0d reset=%0d",
             n_digit_corr, n_add_carry, n_end_around, n_nines_corr, n_equal,
             n_back_to_back, n_bubble, n_reset);
    checks++;
    if (n_digit_corr == 0 || n_add_carry == 0 || n_end_around == 0 || n_nines_corr == 0
        || n_equal == 0 || n_back_to_back == 0 || n_bubble == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
