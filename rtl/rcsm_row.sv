// rcsm_row: one Reversible Controlled Subtract Multiplexer (RCSM) row of the
// digit-by-digit square-root array.
//
// The row subtracts the trial value b = {partial quotient, 2'b01} from the
// partial remainder a (the previous remainder with the next two radicand bits
// appended). W srg_gate cells form a ripple-borrow subtractor, least significant
// cell first, with the first borrow-in and every w4 tied to 0. The borrow out of
// the top cell tells the sign: a feynman_gate with its B input tied to 1 turns it
// into the quotient bit u = ~borrow (1 when a >= b). W rt_mux cells then pass the
// difference on when u = 1 and the unchanged input a when u = 0, so r is the new
// partial remainder.
//
// Ports: a, b (W bits each, unsigned); u, the quotient bit; r, the remainder
// passed to the next row; d, the raw difference (a - b mod 2^W); g5, g6, the
// garbage lines of the subtractor cells; bo, the final borrow (the
// feynman_gate's pass-through line). Combinational; the longest path is the
// borrow ripple through W cells followed by one multiplexer.
//
// The cell chain, the 01-suffixed trial value and the multiplexer choice follow
// the reference array; using a Feynman gate for the sign inversion and
// bringing the garbage lines out as ports are this design's choices.
module rcsm_row #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         u,
  output logic [W-1:0] r,
  output logic [W-1:0] d,
  output logic [W-1:0] g5,
  output logic [W-1:0] g6,
  output logic         bo
);
  logic [W:0] borrow;

  assign borrow[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_cell
    srg_gate u_srg (
      .w1(a[i]),
      .w2(b[i]),
      .w3(borrow[i]),
      .w4(1'b0),
      .w5(g5[i]),
      .w6(g6[i]),
      .w7(borrow[i+1]),
      .w8(d[i])
    );
  end

  feynman_gate u_sign (
    .a(borrow[W]),
    .b(1'b1),
    .p(bo),
    .q(u)
  );

  for (genvar i = 0; i < W; i++) begin : g_mux
    rt_mux u_mux (
      .a (a[i]),
      .di(d[i]),
      .u (u),
      .y (r[i])
    );
  end

endmodule
