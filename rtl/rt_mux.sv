// rt_mux: reversible 2:1 multiplexer of one rooter bit (RT gate).
//
// After a digit step subtracts, the quotient bit u says whether the
// subtraction succeeded. u = 1: the difference bit di becomes the remainder
// bit handed to the next step. u = 0: the step's own input bit a is handed on
// unchanged (the remainder is "restored" by selection, not by adding back).
//   y = a & ~u | u & di
// This is the expression AB' + BC of the RT gate with A = a, B = u, C = di.
// Only this selected output is modelled; the gate's other outputs carry no
// information the array uses. Purely combinational.
module rt_mux (
  input  logic a,
  input  logic di,
  input  logic u,
  output logic y
);

  assign y = (a & ~u) | (u & di);

endmodule
