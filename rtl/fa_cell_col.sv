// Full-adder cell of the column-bypassing Braun array.
//
// The cell at column i of row j adds the partial product a_i*b_j (pp), the
// sum coming down from the row above (s_in) and the carry from the cell
// above it in the same column (c_in). When the multiplicand bit a_i is 0
// every partial product of the column is 0, and by induction down the column
// every carry in it is 0 too, so each cell would only pass s_in on. The cell
// is then switched off: two input buffers (modelled as AND gates holding the
// sum and carry inputs of the full adder at 0) stop it from toggling, and one
// output multiplexer passes s_in to s_out. The carry out is the full adder's
// own, which is 0 while the cell is off.
//
// Combinational. One FA, one multiplexer and two buffers per cell, as the
// document counts them; gating the buffers to 0 is this design's choice.
module fa_cell_col (
  input  logic pp,     // a_i & b_j
  input  logic s_in,   // sum from the row above, same weight
  input  logic c_in,   // carry from the cell above, same weight
  input  logic a_i,    // multiplicand bit of this column: 0 bypasses it
  output logic s_out,
  output logic c_out
);

  logic en;
  logic fa_s;

  assign en = a_i;

  full_adder u_fa (
    .x (pp),
    .y (s_in & en),
    .z (c_in & en),
    .s (fa_s),
    .co(c_out)
  );

  assign s_out = en ? fa_s : s_in;

endmodule
