// tb_rt_mux: exhaustive self-checking test of the reversible multiplexer.
// For all eight inputs, y must equal di when u = 1 and a when u = 0.
module tb_rt_mux;
  logic a, di, u, y;
  int checks = 0, failures = 0;

  rt_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp;
      {a, di, u} = 3'(v);
      #1;
      exp = (v % 2 == 1) ? di : a;
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL a=%b di=%b u=%b: y=%b exp %b", a, di, u, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
