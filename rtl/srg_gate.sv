// srg_gate: Samiur Rahman Gate (SRG), a 4-input / 4-output reversible gate.
//
// Outputs:
//   w5 = w1 ^ w3                      (garbage)
//   w6 = w1 ^ w2                      (garbage)
//   w7 = ~w1&w2 ^ ~w1&w3 ^ w2&w3      (borrow out of w1 - w2 - w3)
//   w8 = w1 ^ w2 ^ w3 ^ w4            (difference when w4 = 0)
// With w4 tied to 0 the gate is a full subtractor: w1 is the minuend bit,
// w2 the subtrahend bit, w3 the borrow in, w7 the borrow out and w8 the
// difference. In the rooter array the pins are called A, B, C, D (inputs)
// and G, G, BO, DI (outputs). The equations are the published gate
// definition; the port names follow it. Purely combinational.
module srg_gate (
  input  logic w1,
  input  logic w2,
  input  logic w3,
  input  logic w4,
  output logic w5,
  output logic w6,
  output logic w7,
  output logic w8
);

  assign w5 = w1 ^ w3;
  assign w6 = w1 ^ w2;
  assign w7 = (~w1 & w2) ^ (~w1 & w3) ^ (w2 & w3);
  assign w8 = w1 ^ w2 ^ w3 ^ w4;

endmodule
