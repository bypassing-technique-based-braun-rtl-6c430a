// W-bit ripple carry adder: {co, s} = a + b + ci.
//
// A chain of W full adders; the carry out of bit i is the carry in of bit
// i+1, so the result settles after W full-adder delays. Combinational, no
// clock. Used as one of the two choices for the final stage of the
// multipliers and as the correction chain on the right edge of the
// row-bypassing arrays. The structure is the document's (its Fig. 1 at W = 4);
// the carry in port is kept for the correction chain.
module rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);

  logic [W:0] c;

  assign c[0] = ci;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .x (a[i]),
      .y (b[i]),
      .z (c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

  assign co = c[W];

endmodule
