// binary_sqrt: combinational integer square root, u = floor(sqrt(p)), built as
// an array of reversible-logic rows (digit-by-digit method, two radicand bits
// per root bit).
//
// Row k takes the partial remainder left by row k-1 with the next two radicand
// bits appended (row 0 takes only p[SIZE-1:SIZE-2]) and subtracts the trial
// value {root bits found so far, 2'b01}. A non-negative result sets the root bit
// and the difference becomes the new remainder; a negative result clears the
// root bit and the row's input is passed on unchanged. Each row is an rcsm_row
// (SRG full subtractors, a Feynman gate for the sign, RT multiplexers). The last
// row only has to deliver its root bit, so its remainder is left unused.
// The raw difference, the SRG garbage lines and the Feynman pass-through of
// every row are the garbage outputs of the reversible array: they are kept
// inside the row instances and not brought out, so lint reports them unused.
//
// With the default SIZE = 8 the array has rows of 2, 4, 6 and 6 subtractor
// cells (18 SRG gates) and hands 2, 4 and 4 remainder bits between rows, as in
// the reference 8-bit array. SIZE is a parameter, must be even and at least 4.
//
// Fixed point: the circuit only sees bits. If p carries F fraction bits (F
// even), u carries F/2 of them, e.g. p as 4.4 bits gives u as 2.2 bits.
//
// Ports: p, SIZE-bit unsigned radicand; u, SIZE/2-bit root. No clock: the result
// settles after the borrow ripples of all rows.
module binary_sqrt
  import binary_sqrt_pkg::*;
#(
  parameter int unsigned SIZE = 8
) (
  input  logic [SIZE-1:0]   p,
  output logic [SIZE/2-1:0] u
);
  localparam int unsigned HALF = SIZE / 2;
  localparam int unsigned WMAX = HALF + 2;

  // rem[k]: remainder handed from row k to row k+1, low rem_width(k) bits valid
  logic [WMAX-1:0] rem [HALF];

  for (genvar k = 0; k < HALF; k++) begin : g_row
    localparam int unsigned W  = row_width(k, HALF);
    localparam int unsigned RB = rem_width(k, HALF);

    logic [W-1:0] a, b, r, d, g5, g6;
    logic         bo;

    // minuend: previous remainder, then the next two radicand bits
    if (k == 0) begin : g_a_first
      assign a = p[SIZE-1 -: 2];
    end else begin : g_a_next
      assign a = {rem[k-1][W-3:0], p[SIZE-1-2*k -: 2]};
    end

    // trial value: root bits found so far, then 01
    if (k == 0) begin : g_b_first
      assign b = W'(2'b01);
    end else begin : g_b_next
      assign b = W'({u[HALF-1 -: k], 2'b01});
    end

    rcsm_row #(.W(W)) u_row (
      .a (a),
      .b (b),
      .u (u[HALF-1-k]),
      .r (r),
      .d (d),
      .g5(g5),
      .g6(g6),
      .bo(bo)
    );

    assign rem[k] = WMAX'(r[RB-1:0]);
  end

  initial assert (SIZE >= 4 && SIZE % 2 == 0)
    else $error("binary_sqrt: SIZE must be even and at least 4");
endmodule
