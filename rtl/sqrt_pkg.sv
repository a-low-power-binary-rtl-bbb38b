// sqrt_pkg: sizing rules of the square-rooter array.
//
// The rooter of an N-bit radicand has M = N/2 digit steps (rows). Row k
// (k = 1..M) subtracts B = {root so far, 0, 1} from A = {remainder so far,
// next two radicand bits} with a row of AW(k) full-subtractor gates and, for
// k < M, keeps the low RW(k) bits of the selected result as the remainder
// passed to row k+1:
//   AW(1) = 2,  AW(k) = RW(k-1) + 2
//   RW(k) = min(2k, M) for k < M,  RW(M) = 0
// The remainder after row k is at most twice the k-bit partial root, so it
// needs k+1 bits, which RW(k) always covers. At N = 8 these rules give rows of
// 2, 4, 6 and 6 gates followed by 2, 4, 4 and 0 multiplexers, the shape of the
// published 8-bit array. The gates and multiplexers are numbered from 1,
// row by row and least significant bit first within a row; SRT_OFF and MUX_OFF
// give the number of gates before row k.
package sqrt_pkg;

  function automatic int rw(input int k, input int m);
    if (k >= m) return 0;
    return (2 * k < m) ? 2 * k : m;
  endfunction

  function automatic int aw(input int k, input int m);
    if (k <= 1) return 2;
    return rw(k - 1, m) + 2;
  endfunction

  function automatic int srt_off(input int k, input int m);
    int s = 0;
    for (int j = 1; j < k; j++) s += aw(j, m);
    return s;
  endfunction

  function automatic int mux_off(input int k, input int m);
    int s = 0;
    for (int j = 1; j < k; j++) s += rw(j, m);
    return s;
  endfunction

  // Total subtractor gates and multiplexers of an array with m rows.
  function automatic int n_srt(input int m);
    return srt_off(m + 1, m);
  endfunction

  function automatic int n_mux(input int m);
    return mux_off(m + 1, m);
  endfunction

endpackage
