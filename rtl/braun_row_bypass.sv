// N x N unsigned Braun array multiplier with row bypassing: p = a * b.
//
// The carry-save array is the same as in braun_col_bypass: (N-1)*(N-1)
// cells, cell (i, j) adding a_i*b_j, the sum of cell (i+1, j-1) and the carry
// of cell (i, j-1), then an (N-1)-bit final adder (RCA or KSA by ADDER).
//
// Row bypassing: every cell of row j is switched off when b_j = 0 (see
// fa_cell_row). The row then has to hand on the two vectors coming from the
// row above without adding them. Sums keep their weight when passed straight
// on, but a carry passed straight down would double its weight, so each
// carry is moved one column to the right instead, into the carry slot of the
// right-hand neighbour. The carry that entered the rightmost cell has no
// neighbour to move to; it would be lost, which is why a plain bypassed row
// gives a wrong product. Here it is caught by an AND gate (dropped_j =
// ~b_j & carry into the rightmost cell) and added back by the correction
// chain on the right edge of the array: an (N-1)-bit ripple adder that adds
// the dropped carries of rows 1..N-1 to the low product bits P_1..P_{N-1}
// and passes its carry out into the final adder.
//
// Purely combinational, no clock. The bypass of rows and the need for extra
// circuitry at the right edge follow the document; the carry re-routing and
// the form of the correction chain are this design's own. Parameter
// defaults are the document's 16-bit design with a KSA final stage.
module braun_row_bypass
  import braun_pkg::*;
#(
  parameter int unsigned  N     = 16,
  parameter final_adder_e ADDER = ADDER_KSA
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  logic [N-1:0] s [N];   // s[j][i]: sum out of cell (i, j); s[j][N-1] = a_{N-1}*b_j
  logic [N-2:0] c [N];   // c[j][i]: carry out of cell (i, j)
  logic [N-1:0] lo;      // uncorrected low product bits, lo[j] = s[j][0]
  logic [N-1:1] dropped; // dropped[j]: carry of weight j lost by bypassed row j
  logic         corr_co; // carry of the correction chain into the final adder

  assign s[0] = a & {N{b[0]}};
  assign c[0] = '0;

  for (genvar j = 1; j < N; j++) begin : g_row
    assign s[j][N-1] = a[N-1] & b[j];
    assign dropped[j] = ~b[j] & c[j-1][0];
    for (genvar i = 0; i < N - 1; i++) begin : g_col
      logic c_left;
      if (i < N - 2) begin : g_inner
        assign c_left = c[j-1][i+1];
      end else begin : g_edge
        assign c_left = 1'b0;
      end
      fa_cell_row u_cell (
        .pp       (a[i] & b[j]),
        .s_in     (s[j-1][i+1]),
        .c_in     (c[j-1][i]),
        .c_in_left(c_left),
        .b_j      (b[j]),
        .s_out    (s[j][i]),
        .c_out    (c[j][i])
      );
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_low
    assign lo[j] = s[j][0];
  end

  assign p[0] = lo[0];

  // correction chain on the right edge of the array
  rca #(.W(N - 1)) u_corr (
    .a (lo[N-1:1]),
    .b (dropped[N-1:1]),
    .ci(1'b0),
    .s (p[N-1:1]),
    .co(corr_co)
  );

  braun_final_adder #(.W(N - 1), .ADDER(ADDER)) u_final (
    .a (s[N-1][N-1:1]),
    .b (c[N-1]),
    .ci(corr_co),
    .s (p[2*N-2:N]),
    .co(p[2*N-1])
  );

endmodule
