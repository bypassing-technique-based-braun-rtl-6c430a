// Self-checking testbench for fa_cell_col: every input combination in which
// the partial product is consistent with the column bit (pp implies a_i).
// Expected: with a_i = 1 the cell is a full adder of pp, s_in and c_in; with
// a_i = 0 it passes s_in on, gives carry 0 and holds its full adder idle.
module tb_fa_cell_col;

  int checks = 0, failures = 0;
  logic pp, s_in, c_in, a_i, s_out, c_out;

  fa_cell_col dut (.pp(pp), .s_in(s_in), .c_in(c_in), .a_i(a_i),
                   .s_out(s_out), .c_out(c_out));

  initial begin : watchdog
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_s, exp_c;
      int   ones;
      {pp, s_in, c_in, a_i} = 4'(v);
      if (pp && !a_i) continue;
      ones = int'(pp) + int'(s_in) + int'(c_in);
      if (a_i) begin
        exp_s = ones[0];
        exp_c = ones >= 2;
      end else begin
        exp_s = s_in;
        exp_c = 1'b0;
      end
      #1;
      checks++;
      if (s_out !== exp_s || c_out !== exp_c) begin
        failures++;
        $display("FAIL in=%04b got s=%b c=%b exp s=%b c=%b", v[3:0], s_out, c_out, exp_s, exp_c);
      end
      checks++;
      if (!a_i && (dut.u_fa.y !== 1'b0 || dut.u_fa.z !== 1'b0)) begin
        failures++;
        $display("FAIL in=%04b full adder not isolated", v[3:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
