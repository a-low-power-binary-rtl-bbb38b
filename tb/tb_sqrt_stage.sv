// tb_sqrt_stage: self-checking test of one digit step of the rooter.
//
// Three rows are tested exhaustively over all operand pairs: the 6-gate row
// with 4 multiplexers and the 6-gate row without multiplexers (the shapes of
// rows 3 and 4 of the 8-bit array) and the 2-gate first row. For each pair the
// reference is integer arithmetic: u = (a >= b), d = (a - b) mod 2^AW, the
// borrow out of gate i is 1 when the low i+1 bits of a are below those of b,
// and r = low RW bits of (u ? d : a). Both outcomes of the trial subtraction
// are counted and each must occur.
module tb_sqrt_stage;
  int checks = 0, failures = 0;
  int n_pass_diff = 0, n_pass_input = 0;

  task automatic check(input longint got, input longint exp, input string what,
                       input int a, input int b);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d: got %0d exp %0d", what, a, b, got, exp);
    end
  endtask

  // Row with 6 gates and 4 multiplexers.
  logic [5:0] a6, b6, d6, bo6, d6n, bo6n, a6n, b6n;
  logic [11:0] g6, g6n;
  logic u6, u6n;
  logic [3:0] r6;
  logic [0:0] r6n;
  sqrt_stage #(.AW(6), .RW(4)) dut6 (.a(a6), .b(b6), .d(d6), .bo(bo6), .g(g6), .u(u6), .r(r6));
  sqrt_stage #(.AW(6), .RW(0)) dut6n (.a(a6n), .b(b6n), .d(d6n), .bo(bo6n), .g(g6n), .u(u6n), .r(r6n));

  // First row: 2 gates, 2 multiplexers.
  logic [1:0] a2, b2, d2, bo2, r2;
  logic [3:0] g2;
  logic u2;
  sqrt_stage #(.AW(2), .RW(2)) dut2 (.a(a2), .b(b2), .d(d2), .bo(bo2), .g(g2), .u(u2), .r(r2));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++) begin
      for (int b = 0; b < 64; b++) begin
        int ok;
        a6 = 6'(a); b6 = 6'(b); a6n = 6'(a); b6n = 6'(b);
        #1;
        ok = (a >= b);
        if (ok != 0) n_pass_diff++; else n_pass_input++;
        check(u6, ok, "u6", a, b);
        check(d6, (a - b) & 63, "d6", a, b);
        for (int i = 0; i < 6; i++) begin
          int m;
          m = (1 << (i + 1)) - 1;
          check(bo6[i], (a & m) < (b & m), "bo6", a, b);
          check(g6[2*i], ((a >> i) ^ (((a & (m >> 1)) < (b & (m >> 1))) ? 1 : 0)) & 1, "g6 w5", a, b);
          check(g6[2*i+1], ((a ^ b) >> i) & 1, "g6 w6", a, b);
        end
        check(r6, (ok != 0 ? (a - b) : a) & 15, "r6", a, b);
        check(u6n, ok, "u6n", a, b);
        check(d6n, (a - b) & 63, "d6n", a, b);
      end
    end
    for (int a = 0; a < 4; a++) begin
      for (int b = 0; b < 4; b++) begin
        a2 = 2'(a); b2 = 2'(b);
        #1;
        check(u2, a >= b, "u2", a, b);
        check(d2, (a - b) & 3, "d2", a, b);
        check(r2, (a >= b) ? ((a - b) & 3) : a, "r2", a, b);
      end
    end
    checks++;
    if (n_pass_diff == 0 || n_pass_input == 0) begin
      failures++;
      $display("FAIL an outcome never occurred: diff %0d input %0d", n_pass_diff, n_pass_input);
    end
    $display("difference passed %0d times, input passed %0d times", n_pass_diff, n_pass_input);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
