// End-to-end testbench for braun_bypass_top at its default size (16 bits).
//
// Every operand pair is applied to all six multipliers and each product is
// compared with integer multiplication. Operands are the operand pairs of
// the published simulation runs, corner cases, and random values of random bit density.
// The testbench also counts how often each bypassing mechanism acted, read
// from inside the arrays, and counts a failure for any that never did:
//   row bypass        a row switched off because b_j = 0
//   row correction    a bypassed row dropped a carry that the right-edge
//                     chain had to add back (row and mixed arrays)
//   column bypass     a column switched off because a_i = 0
//   mixed column off  a mixed-array cell switched off by a_i = 0 alone
//   mixed carry keep  a mixed-array cell with a_i = 0 kept on because a
//                     carry arrived from a bypassed row above
// The multipliers are combinational; one operand pair is applied per 1 time
// unit step.
module tb_braun_bypass_top;

  localparam int N = 16;

  int checks = 0, failures = 0;
  int n_row = 0, n_row_corr = 0, n_col = 0, n_mix_col_off = 0, n_mix_keep = 0;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p_row_rca, p_row_ksa, p_col_rca, p_col_ksa, p_mix_rca, p_mix_ksa;

  braun_bypass_top dut (
    .a(a), .b(b),
    .p_row_rca(p_row_rca), .p_row_ksa(p_row_ksa),
    .p_col_rca(p_col_rca), .p_col_ksa(p_col_ksa),
    .p_mix_rca(p_mix_rca), .p_mix_ksa(p_mix_ksa)
  );

  // per-cell state of the mixed KSA array, collected from inside it
  logic [N-1:1][N-2:0] mix_col_off, mix_keep;
  for (genvar j = 1; j < N; j++) begin : g_row
    for (genvar i = 0; i < N - 1; i++) begin : g_col
      assign mix_col_off[j][i] = b[j] & ~dut.u_mix_ksa.g_row[j].g_col[i].u_cell.en;
      assign mix_keep[j][i]    = b[j] & ~a[i] & dut.u_mix_ksa.g_row[j].g_col[i].u_cell.en;
    end
  end

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [2*N-1:0] exp;
    a = x; b = y;
    exp = (2*N)'(x) * (2*N)'(y);
    #1;
    checks++;
    if (p_row_rca !== exp || p_row_ksa !== exp || p_col_rca !== exp ||
        p_col_ksa !== exp || p_mix_rca !== exp || p_mix_ksa !== exp) begin
      failures++;
      $display("FAIL %0d*%0d exp %0d: row %0d/%0d col %0d/%0d mix %0d/%0d", x, y, exp,
               p_row_rca, p_row_ksa, p_col_rca, p_col_ksa, p_mix_rca, p_mix_ksa);
    end
    n_row         += $countones(~y[N-1:1]);
    n_col         += $countones(~x[N-2:0]);
    n_row_corr    += int'(dut.u_row_ksa.dropped != '0) + int'(dut.u_mix_ksa.dropped != '0);
    n_mix_col_off += $countones(mix_col_off);
    n_mix_keep    += $countones(mix_keep);
  endtask

  initial begin
    // values shown in the document's simulation runs
    apply(16'd257,  16'd256);
    apply(16'd256,  16'd257);
    apply(16'd17,   16'd272);
    apply(16'd16,   16'd273);
    apply(16'd1,    16'd16);
    apply(16'd0,    16'd1);
    apply(16'd4369, 16'd4353);
    apply(16'd4352, 16'd4369);
    apply(16'd4353, 16'd1);
    apply(16'd4368, 16'd16);
    // corners
    apply('0, '0);
    apply('1, '1);
    apply('1, '0);
    apply('0, '1);
    apply(16'hAAAA, 16'h5555);
    // random operands of random bit density
    for (int n = 0; n < 20000; n++) begin
      logic [N-1:0] x, y;
      x = N'($urandom); y = N'($urandom);
      if ($urandom_range(1) != 0) x &= N'($urandom);
      if ($urandom_range(1) != 0) y &= N'($urandom);
      if ($urandom_range(3) == 0) x |= N'($urandom);
      apply(x, y);
    end
    $display("row bypass %0d, row correction %0d, column bypass %0d, mixed column off %0d, mixed carry keep %0d",
             n_row, n_row_corr, n_col, n_mix_col_off, n_mix_keep);
    checks++;
    if (n_row == 0 || n_row_corr == 0 || n_col == 0 || n_mix_col_off == 0 || n_mix_keep == 0) begin
      failures++;
      $display("FAIL a bypassing mechanism never acted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
