// Final (vector-merging) stage of the Braun multipliers: {co, s} = a + b + ci.
//
// Instantiates either the ripple carry adder or the Kogge-Stone adder,
// chosen by ADDER at elaboration, the two last-stage adders the document
// compares. Combinational.
module braun_final_adder
  import braun_pkg::*;
#(
  parameter int unsigned  W     = 15,
  parameter final_adder_e ADDER = ADDER_KSA
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);

  if (ADDER == ADDER_KSA) begin : g_ksa
    ksa #(.W(W)) u_add (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  end else begin : g_rca
    rca #(.W(W)) u_add (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  end

endmodule
