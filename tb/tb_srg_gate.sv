// tb_srg_gate: exhaustive self-checking test of the Samiur Rahman gate.
//
// All 16 input combinations are applied. With w4 = 0 the borrow and difference
// are compared with integer subtraction w1 - w2 - w3; with w4 = 1 the
// difference must be inverted and the borrow unchanged. The garbage outputs
// are compared with their xor definitions. The eight rows of the gate's
// published truth table (w4 = 0) are also checked literally.
module tb_srg_gate;
  logic w1, w2, w3, w4, w5, w6, w7, w8;
  int checks = 0, failures = 0;

  srg_gate dut (.*);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: w1..w4=%b%b%b%b got %b exp %b", what, w1, w2, w3, w4, got, exp);
    end
  endtask

  // Published truth table rows {w1,w2,w3, w7,w8} with w4 = 0.
  localparam logic [4:0] TABLE [8] = '{
    5'b000_00, 5'b001_11, 5'b010_11, 5'b011_10,
    5'b100_01, 5'b101_00, 5'b110_00, 5'b111_11
  };

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int diff;
      {w1, w2, w3, w4} = 4'(v);
      #1;
      diff = int'(w1) - int'(w2) - int'(w3);
      check(w7, diff < 0, "borrow");
      check(w8, logic'(diff[0]) ^ w4, "difference");
      check(w5, w1 != w3, "garbage w5");
      check(w6, w1 != w2, "garbage w6");
    end
    w4 = 1'b0;
    foreach (TABLE[i]) begin
      {w1, w2, w3} = TABLE[i][4:2];
      #1;
      check(w7, TABLE[i][1], "table W7");
      check(w8, TABLE[i][0], "table W8");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
