// Full-adder cell of the row-bypassing Braun array.
//
// The cell at column i of row j adds the partial product a_i*b_j (pp), the
// sum coming down from the row above (s_in) and the carry coming down from
// the row above (c_in). When the row's multiplier bit b_j is 0 the whole row
// has nothing to add, so the cell is switched off: three input buffers
// (modelled as AND gates that hold the full adder's inputs at 0) stop it
// from toggling, and two output multiplexers route the row above past it.
// The sum passes straight on. The carry slot takes the carry that entered
// the left-hand neighbour (c_in_left), which has the weight this cell's
// carry out would have had; the carry that entered this cell goes one cell
// to the right in the same way, and the rightmost one is picked up by the
// correction chain of the array.
//
// Combinational. The FA, the two multiplexers and the three buffers follow
// the cell drawn for this array; gating the buffers to 0 rather than
// leaving them floating, and the carry re-routing, are this design's choices.
module fa_cell_row (
  input  logic pp,         // a_i & b_j
  input  logic s_in,       // sum from the row above, same weight
  input  logic c_in,       // carry from the row above, same weight
  input  logic c_in_left,  // carry into the left-hand neighbour (weight +1)
  input  logic b_j,        // multiplier bit of this row: 0 bypasses the row
  output logic s_out,
  output logic c_out
);

  logic en;
  logic fa_s, fa_c;

  assign en = b_j;

  full_adder u_fa (
    .x (pp & en),
    .y (s_in & en),
    .z (c_in & en),
    .s (fa_s),
    .co(fa_c)
  );

  assign s_out = en ? fa_s : s_in;
  assign c_out = en ? fa_c : c_in_left;

endmodule
