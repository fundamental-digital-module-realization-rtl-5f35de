// feynman_gate: the Feynman (controlled-NOT) reversible gate, P = A, Q = A ^ B.
// In the square-root array it forms each quotient bit from a row's final borrow:
// with B tied to 1, Q = ~A, so Q is 1 when the trial subtraction did not borrow
// (was non-negative), and P carries the borrow on as a garbage line. The use of
// the gate for this inversion is this design's choice; the gate itself is the
// standard two-line reversible gate. Purely combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule
