// sqrt_stage: one digit step (one row) of the square-rooter array.
//
// A row of AW Samiur Rahman gates, wired as a ripple-borrow subtractor,
// computes d = a - b. The first gate's borrow in is 0, each further gate takes
// the borrow out of the gate below it, and every gate's fourth input (D) is 0
// so that it subtracts. The borrow out of the top gate tells the sign:
//   u = ~bo[AW-1]   (1: a >= b, the trial subtraction succeeded)
// A row of RW reversible multiplexers then hands the low RW bits of either d
// (u = 1) or a (u = 0) to the next row as its remainder. The last row of the
// array has no multiplexers (RW = 0); r is then a single constant-0 bit that
// nobody reads.
//
// In the array, a = {remainder of the row above, next two radicand bits} and
// b = {root bits found so far, 0, 1}, zero-extended to AW bits. This module
// leaves forming them to the array.
//
// Ports: a, b: AW-bit operands; d, bo: per-gate difference and borrow out;
// g: per-gate garbage outputs {w6, w5} of gate i at g[2i+1:2i]; u: the new
// root bit; r: the next remainder. Purely combinational.
module sqrt_stage #(
  parameter int AW = 2,
  parameter int RW = 2
) (
  input  logic [AW-1:0]                 a,
  input  logic [AW-1:0]                 b,
  output logic [AW-1:0]                 d,
  output logic [AW-1:0]                 bo,
  output logic [2*AW-1:0]               g,
  output logic                          u,
  output logic [(RW > 0 ? RW : 1)-1:0]  r
);

  initial begin
    assert (AW >= 2) else $error("sqrt_stage: AW must be at least 2");
    assert (RW <= AW) else $error("sqrt_stage: RW must not exceed AW");
  end

  // Borrow into each gate: 0 for the least significant, else the one below.
  logic [AW-1:0] bin;
  assign bin = {bo[AW-2:0], 1'b0};

  for (genvar i = 0; i < AW; i++) begin : g_srt
    srg_gate u_srg (
      .w1 (a[i]),
      .w2 (b[i]),
      .w3 (bin[i]),
      .w4 (1'b0),
      .w5 (g[2*i]),
      .w6 (g[2*i+1]),
      .w7 (bo[i]),
      .w8 (d[i])
    );
  end

  assign u = ~bo[AW-1];

  if (RW > 0) begin : g_mux_row
    for (genvar i = 0; i < RW; i++) begin : g_mux
      rt_mux u_mux (
        .a  (a[i]),
        .di (d[i]),
        .u  (u),
        .y  (r[i])
      );
    end
  end else begin : g_no_mux
    assign r = 1'b0;
  end

endmodule
