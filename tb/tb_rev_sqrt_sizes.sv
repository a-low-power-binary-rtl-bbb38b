// tb_rev_sqrt_sizes: checks the rooter array at other radicand widths.
//
// Instances with N = 4, 6, 10, 12 and 16 run side by side, each over every
// radicand of its width, and compare the root with an integer square root
// found by counting up. This exercises the row-sizing rule that extends the
// 8-bit array to any even width. Per-gate outputs are left open here.
module tb_rev_sqrt_sizes;
  localparam int NSIZES = 5;
  localparam int SIZES [NSIZES] = '{4, 6, 10, 12, 16};

  int checks = 0, failures = 0, done = 0;

  function automatic int isqrt(input int x);
    int r = 0;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar s = 0; s < NSIZES; s++) begin : g_size
    localparam int N = SIZES[s];
    logic [N-1:0]   n;
    logic [N/2-1:0] u;

    rev_sqrt #(.N(N)) dut (
      .n       (n),
      .u       (u),
      .d       (),
      .b       (),
      .g       (),
      .mux_out ()
    );

    initial begin
      int bad;
      bad = 0;
      for (int v = 0; v < (1 << N); v++) begin
        n = N'(v);
        #1;
        checks++;
        if (int'(u) != isqrt(v)) begin
          failures++;
          bad++;
          if (bad < 5) $display("FAIL N=%0d n=%0d: root %0d exp %0d", N, v, u, isqrt(v));
        end
      end
      $display("N=%0d: %0d radicands checked, %0d wrong", N, 1 << N, bad);
      done++;
    end
  end

  initial begin
    wait (done == NSIZES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
