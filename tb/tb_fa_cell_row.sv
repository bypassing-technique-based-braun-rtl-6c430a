// Self-checking testbench for fa_cell_row: every input combination in which
// the partial product is consistent with the row bit (pp implies b_j).
// Expected: with b_j = 1 the cell is a full adder of pp, s_in and c_in; with
// b_j = 0 it passes s_in and c_in_left on and its full adder is held idle.
module tb_fa_cell_row;

  int checks = 0, failures = 0;
  logic pp, s_in, c_in, c_in_left, b_j, s_out, c_out;

  fa_cell_row dut (.pp(pp), .s_in(s_in), .c_in(c_in), .c_in_left(c_in_left),
                   .b_j(b_j), .s_out(s_out), .c_out(c_out));

  initial begin : watchdog
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic exp_s, exp_c;
      int   ones;
      {pp, s_in, c_in, c_in_left, b_j} = 5'(v);
      if (pp && !b_j) continue;
      ones = int'(pp) + int'(s_in) + int'(c_in);
      if (b_j) begin
        exp_s = ones[0];
        exp_c = ones >= 2;
      end else begin
        exp_s = s_in;
        exp_c = c_in_left;
      end
      #1;
      checks++;
      if (s_out !== exp_s || c_out !== exp_c) begin
        failures++;
        $display("FAIL in=%05b got s=%b c=%b exp s=%b c=%b", v[4:0], s_out, c_out, exp_s, exp_c);
      end
      // a bypassed cell's full adder must see constant zero inputs
      checks++;
      if (!b_j && (dut.u_fa.y !== 1'b0 || dut.u_fa.z !== 1'b0 || dut.u_fa.x !== 1'b0)) begin
        failures++;
        $display("FAIL in=%05b full adder not isolated", v[4:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
