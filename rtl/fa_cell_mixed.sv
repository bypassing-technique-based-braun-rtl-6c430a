// Full-adder cell of the row-and-column (mixed) bypassing Braun array.
//
// The cell adds the partial product a_i*b_j (pp), the sum from the row above
// (s_in) and the carry from the cell above (c_in). It is switched off when
// its row has nothing to add (b_j = 0) or when its column has nothing to add
// (a_i = 0) and no carry is arriving (c_in = 0):
//     en = b_j & (a_i | c_in)      -- one AND and one OR gate per cell
// The carry condition is needed because a bypassed row above re-routes
// carries one column to the right, so a column whose a_i is 0 can still
// receive a carry; the cell then adds it rather than dropping it.
// While off, two input buffers (AND gates holding s_in and c_in of the full
// adder at 0) stop it from toggling. The sum multiplexer passes s_in; the
// carry multiplexer passes c_in_left, the carry into the left-hand
// neighbour, when the row is bypassed, and the (zero) full-adder carry when
// only the column is.
//
// Combinational. One FA, two multiplexers and two buffers per cell follow the
// document's count; the enable equation is this design's own.
module fa_cell_mixed (
  input  logic pp,         // a_i & b_j
  input  logic s_in,       // sum from the row above, same weight
  input  logic c_in,       // carry from the cell above, same weight
  input  logic c_in_left,  // carry into the left-hand neighbour (weight +1)
  input  logic a_i,        // multiplicand bit of this column
  input  logic b_j,        // multiplier bit of this row
  output logic s_out,
  output logic c_out
);

  logic en;
  logic fa_s, fa_c;

  assign en = b_j & (a_i | c_in);

  full_adder u_fa (
    .x (pp),
    .y (s_in & en),
    .z (c_in & en),
    .s (fa_s),
    .co(fa_c)
  );

  assign s_out = en  ? fa_s : s_in;
  assign c_out = b_j ? fa_c : c_in_left;

endmodule
