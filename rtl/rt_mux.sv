// rt_mux: the RT reversible gate used as a 2:1 multiplexer in the square-root
// array. It forwards either the row's input bit (a) or the row's difference bit
// (di), chosen by the row's quotient bit (u):
//   y = a & ~u | u & di      (the gate's output AB' + BC with A = a, B = u, C = di)
// u = 1 (trial subtraction non-negative) passes the difference, u = 0 restores
// the input. Only the multiplexer output is modelled; the gate's other two
// outputs are garbage lines of the reversible realisation and carry nothing the
// array uses. Reading B as the select (u) is this design's interpretation of
// which input plays which role. Purely combinational.
module rt_mux (
  input  logic a,
  input  logic di,
  input  logic u,
  output logic y
);
  always_comb y = (a & ~u) | (u & di);
endmodule
