// W-bit Kogge-Stone adder: {co, s} = a + b + ci.
//
// Three stages. Preprocessing forms the bit generate g = a & b and propagate
// p = a ^ b; the carry in is folded into bit 0 as G0 = g0 | p0 & ci. The
// carry network then combines (G, P) pairs at distances 1, 2, 4, ... in
// ceil(log2(W)) levels, every bit at every level, so the group generate of
// bits [i:0] is ready after log2(W) operator delays. Postprocessing forms
// s[i] = p[i] ^ carry into bit i. Combinational, no clock. The three stages
// follow the document; the carry in, needed by the row-bypassing arrays, is
// this design's addition.
module ksa #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] p;
  // gl[k] / pl[k]: group generate / propagate after k prefix levels
  logic [LEVELS:0][W-1:0] gl;
  logic [LEVELS-1:0][W-1:0] pl;  // the last level's propagate is not needed

  // preprocessing
  assign p     = a ^ b;
  assign pl[0] = p;
  assign gl[0] = (a & b) | W'(p[0] & ci);

  // carry generation network: level k combines with the pair 2**(k-1) below
  for (genvar k = 1; k <= LEVELS; k++) begin : g_level
    localparam int unsigned D = 1 << (k - 1);
    for (genvar i = 0; i < W; i++) begin : g_node
      if (i >= D) begin : g_op
        assign gl[k][i] = gl[k-1][i] | (pl[k-1][i] & gl[k-1][i-D]);
        if (k < LEVELS) begin : g_p
          assign pl[k][i] = pl[k-1][i] & pl[k-1][i-D];
        end
      end else begin : g_pass
        assign gl[k][i] = gl[k-1][i];
        if (k < LEVELS) begin : g_p
          assign pl[k][i] = pl[k-1][i];
        end
      end
    end
  end

  // postprocessing
  always_comb begin
    s[0] = p[0] ^ ci;
    for (int i = 1; i < W; i++) s[i] = p[i] ^ gl[LEVELS][i-1];
    co = gl[LEVELS][W-1];
  end

endmodule
