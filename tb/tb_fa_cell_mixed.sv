// Self-checking testbench for fa_cell_mixed: every input combination with
// pp = a_i & b_j. Expected: with b_j = 1 the cell's outputs are the full-adder
// sum and carry of pp, s_in and c_in (whether or not it is switched off);
// with b_j = 0 it passes s_in and c_in_left on. The cell must be switched
// off (its full adder's inputs held at 0) exactly when b_j = 0, or when
// a_i = 0 and c_in = 0.
module tb_fa_cell_mixed;

  int checks = 0, failures = 0;
  logic pp, s_in, c_in, c_in_left, a_i, b_j, s_out, c_out;

  fa_cell_mixed dut (.pp(pp), .s_in(s_in), .c_in(c_in), .c_in_left(c_in_left),
                     .a_i(a_i), .b_j(b_j), .s_out(s_out), .c_out(c_out));

  initial begin : watchdog
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic exp_s, exp_c, exp_off;
      int   ones;
      {s_in, c_in, c_in_left, a_i, b_j} = 5'(v);
      pp = a_i & b_j;
      ones = int'(pp) + int'(s_in) + int'(c_in);
      if (b_j) begin
        exp_s = ones[0];
        exp_c = ones >= 2;
      end else begin
        exp_s = s_in;
        exp_c = c_in_left;
      end
      exp_off = !b_j || (!a_i && !c_in);
      #1;
      checks++;
      if (s_out !== exp_s || c_out !== exp_c) begin
        failures++;
        $display("FAIL in=%05b got s=%b c=%b exp s=%b c=%b", v[4:0], s_out, c_out, exp_s, exp_c);
      end
      checks++;
      if (dut.en !== !exp_off ||
          (exp_off && (dut.u_fa.x !== 1'b0 || dut.u_fa.y !== 1'b0 || dut.u_fa.z !== 1'b0))) begin
        failures++;
        $display("FAIL in=%05b switch-off wrong", v[4:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
