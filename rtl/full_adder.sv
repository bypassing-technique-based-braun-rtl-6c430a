// One-bit full adder: s = x ^ y ^ z, co = majority(x, y, z).
//
// The basic cell of every array and adder in this design. Purely
// combinational; all three inputs have equal weight, the carry out has twice
// that weight. The document gives only the cell's function; the gate-level
// form is left to synthesis.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic co
);

  always_comb begin
    s  = x ^ y ^ z;
    co = (x & y) | (x & z) | (y & z);
  end

endmodule
