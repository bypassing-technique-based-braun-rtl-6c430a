// N x N unsigned Braun array multiplier with column bypassing: p = a * b.
//
// The array is the classic carry-save Braun array of (N-1)*(N-1) full-adder
// cells. Row 0 is the partial products a_i*b_0. Cell (i, j), for rows
// j = 1..N-1 and columns i = 0..N-2, adds a_i*b_j, the sum of cell (i+1, j-1)
// and the carry of cell (i, j-1); the leftmost column is fed with the bare
// partial products a_{N-1}*b_j. Carries therefore stay in the column of their
// multiplicand bit and sums move one column to the right per row. Product bit
// P_j (j < N) is the sum of the rightmost cell of row j; the sums and carries
// left by the last row are merged by an (N-1)-bit final adder, RCA or KSA by
// the ADDER parameter, which produces P_N .. P_{2N-1}.
//
// Column bypassing: every cell of column i is switched off when a_i = 0 (see
// fa_cell_col); since no carry can arise in such a column, passing the sum
// through is exact. The carries of the last row are ANDed with a_i before
// the final adder, so that a switched-off cell can never leak a stale carry.
//
// Purely combinational, no clock; the result is valid one array delay plus
// one final-adder delay after the operands. Structure and counts follow the
// document; parameter defaults are its 16-bit design with a KSA final stage.
module braun_col_bypass
  import braun_pkg::*;
#(
  parameter int unsigned  N     = 16,
  parameter final_adder_e ADDER = ADDER_KSA
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  logic [N-1:0] s [N];  // s[j][i]: sum out of cell (i, j); s[j][N-1] = a_{N-1}*b_j
  logic [N-2:0] c [N];  // c[j][i]: carry out of cell (i, j)

  assign s[0] = a & {N{b[0]}};
  assign c[0] = '0;

  for (genvar j = 1; j < N; j++) begin : g_row
    assign s[j][N-1] = a[N-1] & b[j];
    for (genvar i = 0; i < N - 1; i++) begin : g_col
      fa_cell_col u_cell (
        .pp   (a[i] & b[j]),
        .s_in (s[j-1][i+1]),
        .c_in (c[j-1][i]),
        .a_i  (a[i]),
        .s_out(s[j][i]),
        .c_out(c[j][i])
      );
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_low
    assign p[j] = s[j][0];
  end

  braun_final_adder #(.W(N - 1), .ADDER(ADDER)) u_final (
    .a (s[N-1][N-1:1]),
    .b (c[N-1] & a[N-2:0]),
    .ci(1'b0),
    .s (p[2*N-2:N]),
    .co(p[2*N-1])
  );

endmodule
