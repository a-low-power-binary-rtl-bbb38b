// rev_sqrt: combinational N-bit binary square rooter built from reversible
// gates, after the digit-by-digit (modified non-restoring) algorithm.
//
// The radicand n is split into N/2 pairs of bits. Row 1 subtracts 01 from the
// top pair; row k > 1 appends the next pair to the remainder left by row k-1
// and subtracts the root found so far with 01 appended. A row whose
// subtraction does not borrow sets its root bit to 1 and passes its
// difference on; a row that borrows sets the bit to 0 and passes its input on
// unchanged. The N/2 root bits, most significant first, form
//   u = floor(sqrt(n)).
// Read with the binary point in the middle (n = N7N6N5N4.N3N2N1N0,
// u = U3U2.U1U0 at N = 8) the same hardware gives the fixed-point root,
// truncated: 1101.0000 (13) -> 11.10 (3.5), 0010.0011 (2.1875) -> 01.01 (1.25).
//
// Row sizes come from sqrt_pkg (2, 4, 6, 6 subtractor gates and 2, 4, 4, 0
// multiplexers at N = 8, as in the published 8-bit array; the rule that
// extends them to other even N is this design's own). Every gate's outputs
// are brought out for inspection, numbered from 1 as SRT1..SRT18 and
// G1..G36 at N = 8: row by row from the top pair down, least significant
// bit first within a row. Gate k drives d[k] (its difference), b[k] (its
// borrow out) and g[2k-1], g[2k] (its garbage outputs W5, W6); multiplexer j
// drives mux_out[j]. The last row has no multiplexers; the final remainder
// n - u*u is that row's difference when u[0] = 1 and its input otherwise.
//
// No clock, no reset, no registers: u settles one ripple through all rows
// after n changes. Lint reports the last row's r_k as unused: that row has no
// multiplexers and its stage drives r_k with a constant placeholder bit.
module rev_sqrt
  import sqrt_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N-1:0]                     n,
  output logic [N/2-1:0]                   u,
  output logic [n_srt(N/2):1]              d,
  output logic [n_srt(N/2):1]              b,
  output logic [2*n_srt(N/2):1]            g,
  output logic [n_mux(N/2):1]              mux_out
);

  localparam int M = N / 2;

  initial begin
    assert (N >= 4 && N % 2 == 0) else $error("rev_sqrt: N must be even and at least 4");
  end

  // Row k hands row k+1 its remainder r_k and the root bits found so far,
  // q_k (k bits, most significant first).
  for (genvar k = 1; k <= M; k++) begin : g_row
    localparam int AWK  = aw(k, M);
    localparam int RWK  = rw(k, M);
    localparam int RWIN = (k == 1) ? 0 : rw(k - 1, M);
    localparam int SOFF = srt_off(k, M);
    localparam int MOFF = mux_off(k, M);

    logic [AWK-1:0]                 a_k, b_k, d_k, bo_k;
    logic [2*AWK-1:0]               g_k;
    logic [(RWK > 0 ? RWK : 1)-1:0] r_k;
    logic                           u_k;
    logic [k-1:0]                   q_k;

    // A: remainder from the row above, then the next two radicand bits.
    if (k == 1) begin : g_a_first
      assign a_k = n[N-1 -: 2];
    end else begin : g_a_next
      assign a_k = {g_row[k-1].r_k[RWIN-1:0], n[N-2*k+1 -: 2]};
    end

    // B: root bits found so far, then 01, zero-extended to the row width.
    if (k == 1) begin : g_b_first
      assign b_k = AWK'(2'b01);
    end else begin : g_b_next
      assign b_k = AWK'({g_row[k-1].q_k, 2'b01});
    end

    sqrt_stage #(
      .AW (AWK),
      .RW (RWK)
    ) u_stage (
      .a  (a_k),
      .b  (b_k),
      .d  (d_k),
      .bo (bo_k),
      .g  (g_k),
      .u  (u_k),
      .r  (r_k)
    );

    if (k == 1) begin : g_q_first
      assign q_k = u_k;
    end else begin : g_q_next
      assign q_k = {g_row[k-1].q_k, u_k};
    end

    for (genvar i = 0; i < AWK; i++) begin : g_out
      assign d[SOFF + i + 1]           = d_k[i];
      assign b[SOFF + i + 1]           = bo_k[i];
      assign g[2 * (SOFF + i) + 1]     = g_k[2*i];
      assign g[2 * (SOFF + i) + 2]     = g_k[2*i+1];
    end

    for (genvar i = 0; i < RWK; i++) begin : g_mux_out
      assign mux_out[MOFF + i + 1] = r_k[i];
    end
  end

  assign u = g_row[M].q_k;

endmodule
