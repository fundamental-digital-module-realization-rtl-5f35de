// srg_gate: the Saimur Rahman Gate (SRG), a 4-input, 4-output reversible gate
// that serves as the one-bit full subtractor cell of the square-root array.
//
// Function (all four outputs are given by the gate definition):
//   w5 = w1 ^ w3                          (garbage)
//   w6 = w1 ^ w2                          (garbage)
//   w7 = ~w1&w2 ^ ~w1&w3 ^ w2&w3          (borrow of w1 - w2 - w3)
//   w8 = w1 ^ w2 ^ w3 ^ w4                (difference of w1 - w2 - w3 when w4 = 0)
// With w4 tied to 0 the gate is a full subtractor: w1 is the minuend bit, w2 the
// subtrahend bit and w3 the borrow in. The mapping from (w1..w4) to (w5..w8) is a
// bijection, which is what makes the gate reversible. Purely combinational; no
// clock, no reset. The XOR form of the borrow is kept as defined for the gate;
// it equals the usual majority(~w1, w2, w3).
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
  always_comb begin
    w5 = w1 ^ w3;
    w6 = w1 ^ w2;
    w7 = (~w1 & w2) ^ (~w1 & w3) ^ (w2 & w3);
    w8 = w1 ^ w2 ^ w3 ^ w4;
  end
endmodule
