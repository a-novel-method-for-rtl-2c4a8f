// Self-checking test of the eight-digit BCD subtractor, in both forms:
// combinational (PIPE_STAGES = 0) and with the stage register
// (PIPE_STAGES = 1, result one clock after the operands). df must be |a - b|
// in BCD, br must be 1 exactly when a < b, and sm must be a + 9's(b).
// Directed cases cover a > b, a < b, a == b, zero and all-nines operands.
module tb_bcd_subtractor;
  localparam int unsigned DIGITS = 8;
  localparam longint NINES = 64'd99999999;   // 10^DIGITS - 1
  localparam longint MOD   = NINES + 1;

  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_zero = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4*DIGITS-1:0] a, b, sm0, df0, sm1, df1;
  logic                br0, br1;

  bcd_subtractor #(.PIPE_STAGES(0)) dut0 (.clk(clk), .rst_n(rst_n), .a(a), .b(b),
                                          .sm(sm0), .df(df0), .br(br0));
  bcd_subtractor #(.PIPE_STAGES(1)) dut1 (.clk(clk), .rst_n(rst_n), .a(a), .b(b),
                                          .sm(sm1), .df(df1), .br(br1));

  always #5 clk = ~clk;

  function automatic logic [4*DIGITS-1:0] to_bcd(input longint v);
    logic [4*DIGITS-1:0] r;
    for (int i = 0; i < DIGITS; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  task automatic check(input longint x, input longint y);
    longint mag;
    bit     neg;
    mag = (x >= y) ? x - y : y - x;
    neg = (x < y);
    @(negedge clk);
    a = to_bcd(x); b = to_bcd(y);
    #1;
    checks++;
    if (df0 !== to_bcd(mag) || br0 !== neg || sm0 !== to_bcd(x + (NINES - y) - ((x > y) ? NINES + 1 : 0))) begin
      failures++;
      $display("FAIL comb %0d - %0d -> df %h br %b sm %h", x, y, df0, br0, sm0);
    end
    @(negedge clk);   // one clock later the registered form must agree
    checks++;
    if (df1 !== to_bcd(mag) || br1 !== neg) begin
      failures++;
      $display("FAIL pipe %0d - %0d -> df %h br %b", x, y, df1, br1);
    end
    if (x > y) n_pos++; else if (x < y) n_neg++; else n_zero++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(0, 0);
    check(5, 3);
    check(3, 5);
    check(12345678, 12345678);
    check(99999999, 0);
    check(0, 99999999);
    check(10000000, 1);
    check(1, 10000000);
    check(50000000, 49999999);
    for (int i = 0; i < 2000; i++)
      check((longint'($urandom) % MOD), (longint'($urandom) % MOD));
    for (int i = 0; i < 200; i++) begin   // close operands: long borrow chains
      automatic longint x = (longint'($urandom) % MOD);
      check(x, (x + (longint'($urandom) % 3)) % (NINES + 1));
    end
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL coverage pos=%0d neg=%0d zero=%0d", n_pos, n_neg, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
