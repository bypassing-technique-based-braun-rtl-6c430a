// Bypassing Braun multipliers, all six variants side by side.
//
// One pair of N-bit unsigned operands feeds the three bypassing schemes of
// the Braun array multiplier, each built twice, once with a ripple carry
// final adder and once with a Kogge-Stone final adder:
//   p_row_*  row bypassing       (rows with b_j = 0 are switched off)
//   p_col_*  column bypassing    (columns with a_i = 0 are switched off)
//   p_mix_*  row and column      (cells with a_i = 0 or b_j = 0 switched off)
// All six outputs carry the same 2N-bit product a * b; they differ only in
// how much of the array toggles and in the length of the final carry path.
// p_mix_ksa is the combination the comparison favours for power and delay.
//
// Purely combinational, no clock or reset: every output is valid one array
// delay plus one final-adder delay after a and b change. N defaults to 16,
// the largest size the document builds; 4 and 8 are its other sizes.
module braun_bypass_top
  import braun_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,          // multiplicand
  input  logic [N-1:0]   b,          // multiplier
  output logic [2*N-1:0] p_row_rca,
  output logic [2*N-1:0] p_row_ksa,
  output logic [2*N-1:0] p_col_rca,
  output logic [2*N-1:0] p_col_ksa,
  output logic [2*N-1:0] p_mix_rca,
  output logic [2*N-1:0] p_mix_ksa
);

  braun_row_bypass   #(.N(N), .ADDER(ADDER_RCA)) u_row_rca (.a(a), .b(b), .p(p_row_rca));
  braun_row_bypass   #(.N(N), .ADDER(ADDER_KSA)) u_row_ksa (.a(a), .b(b), .p(p_row_ksa));
  braun_col_bypass   #(.N(N), .ADDER(ADDER_RCA)) u_col_rca (.a(a), .b(b), .p(p_col_rca));
  braun_col_bypass   #(.N(N), .ADDER(ADDER_KSA)) u_col_ksa (.a(a), .b(b), .p(p_col_ksa));
  braun_mixed_bypass #(.N(N), .ADDER(ADDER_RCA)) u_mix_rca (.a(a), .b(b), .p(p_mix_rca));
  braun_mixed_bypass #(.N(N), .ADDER(ADDER_KSA)) u_mix_ksa (.a(a), .b(b), .p(p_mix_ksa));

endmodule
