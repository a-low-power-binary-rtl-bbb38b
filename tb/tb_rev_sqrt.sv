// tb_rev_sqrt: end-to-end self-checking test of the square rooter at its
// default size (N = 8, no parameter override).
//
// 1. Every one of the 256 radicands is applied. The root is compared with an
//    integer square root found by counting up (largest r with r*r <= n), and
//    the remainder n - r*r with what the last row leaves (its difference
//    bits, or its input when its subtraction borrows).
// 2. The two worked examples: 1101.0000 (13) -> 11.10 and
//    0010.0011 (2.1875) -> 01.01.
// 3. For radicand 0010.0011 the per-gate outputs are compared with the values
//    of the reference simulation: d[18:1] = 001010111111000111,
//    b[18:1] = 001000111111000111, mux_out[10:1] = 0100000100.
// Each row's two outcomes (subtraction succeeds and the difference is passed
// on; subtraction borrows and the input is passed on) are counted; an outcome
// that never happens in some row counts as a failure. The rooter is
// combinational, so results are sampled 1 time unit after the input changes.
module tb_rev_sqrt;
  import sqrt_pkg::*;

  localparam int N    = 8;
  localparam int M    = N / 2;
  localparam int NSRT = n_srt(M);
  localparam int NMUX = n_mux(M);
  localparam int LOFF = srt_off(M, M);  // gates before the last row
  localparam int LAW  = aw(M, M);       // gates in the last row
  localparam int LRW  = rw(M - 1, M);   // multiplexers in the row before

  logic [N-1:0]      n;
  logic [M-1:0]      u;
  logic [NSRT:1]     d, b;
  logic [2*NSRT:1]   g;
  logic [NMUX:1]     mux_out;

  rev_sqrt dut (.n(n), .u(u), .d(d), .b(b), .g(g), .mux_out(mux_out));

  int checks = 0, failures = 0;
  int row_pass_diff [1:M];
  int row_pass_input[1:M];

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s n=%b: got %0d exp %0d", what, n, got, exp);
    end
  endtask

  function automatic int isqrt(input int x);
    int r = 0;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 1; k <= M; k++) begin
      row_pass_diff[k] = 0;
      row_pass_input[k] = 0;
    end

    for (int v = 0; v < (1 << N); v++) begin
      int r;
      logic [LAW-1:0] rem_last;
      n = N'(v);
      #1;
      r = isqrt(v);
      check(u, r, "root");
      // The last row has no multiplexers: its difference is the remainder
      // when its root bit is 1, otherwise its input, the previous row's
      // multiplexer outputs followed by n[1:0], is.
      if (u[0]) rem_last = d[LOFF+1 +: LAW];
      else      rem_last = LAW'({mux_out[NMUX-LRW+1 +: LRW], n[1:0]});
      check(rem_last, v - r * r, "remainder");
      for (int k = 1; k <= M; k++) begin
        if (u[M-k]) row_pass_diff[k]++;
        else        row_pass_input[k]++;
      end
    end

    n = 8'b1101_0000;
    #1;
    check(u, 4'b11_10, "sqrt(13)");
    n = 8'b0010_0011;
    #1;
    check(u, 4'b01_01, "sqrt(2.2)");
    check(d, 18'b001010111111000111, "d[18:1] of 0010.0011");
    check(b, 18'b001000111111000111, "b[18:1] of 0010.0011");
    check(mux_out, 10'b0100000100, "mux_out[10:1] of 0010.0011");
    check(d[18:13], 6'b001010, "final remainder 1010 of 0010.0011");

    for (int k = 1; k <= M; k++) begin
      $display("row %0d: difference passed %0d times, input passed %0d times",
               k, row_pass_diff[k], row_pass_input[k]);
      checks++;
      if (row_pass_diff[k] == 0 || row_pass_input[k] == 0) begin
        failures++;
        $display("FAIL row %0d never took one of its two outcomes", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
