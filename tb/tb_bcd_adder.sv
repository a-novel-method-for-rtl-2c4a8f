// Self-checking test of the eight-digit BCD adder. Directed corner cases
// (all nines, carry ripple through every digit, zero) and random BCD operand
// pairs are compared with integer decimal addition.
module tb_bcd_adder;
  localparam int unsigned DIGITS = 8;
  localparam longint MOD = 64'd100000000;   // 10^DIGITS

  int checks = 0, failures = 0;
  logic [4*DIGITS-1:0] a, b;
  logic                cin;
  logic [4*DIGITS:0]   sum;

  bcd_adder dut (.a(a), .b(b), .cin(cin), .sum(sum));

  function automatic logic [4*DIGITS-1:0] to_bcd(input longint v);
    logic [4*DIGITS-1:0] r;
    for (int i = 0; i < DIGITS; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  function automatic longint from_bcd(input logic [4*DIGITS-1:0] x);
    longint v = 0;
    for (int i = DIGITS - 1; i >= 0; i--) v = v * 10 + longint'(x[4*i +: 4]);
    return v;
  endfunction

  task automatic check(input longint x, input longint y, input bit c);
    longint tot;
    a = to_bcd(x); b = to_bcd(y); cin = c;
    #1;
    tot = x + y + longint'(c);
    checks++;
    if (sum[4*DIGITS] !== (tot >= MOD) || from_bcd(sum[4*DIGITS-1:0]) != tot % MOD
        || sum[4*DIGITS-1:0] !== to_bcd(tot % MOD)) begin
      failures++;
      $display("FAIL %0d + %0d + %0d -> carry %b digits %h", x, y, c, sum[4*DIGITS],
               sum[4*DIGITS-1:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0, 0);
    check(0, 0, 1);
    check(99999999, 1, 0);
    check(99999999, 0, 1);
    check(99999999, 99999999, 1);
    check(12345678, 87654321, 0);
    check(55555555, 55555555, 0);
    check(19191919, 91919191, 1);
    for (int i = 0; i < 2000; i++)
      check((longint'($urandom) % MOD), (longint'($urandom) % MOD),
            1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
