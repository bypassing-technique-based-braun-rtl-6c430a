// Self-checking testbench for full_adder: all eight input combinations,
// compared with the count of ones (sum = count mod 2, carry = count >= 2).
module tb_full_adder;

  int checks = 0, failures = 0;
  logic x, y, z, s, co;

  full_adder dut (.x(x), .y(y), .z(z), .s(s), .co(co));

  initial begin : watchdog
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      {x, y, z} = 3'(v);
      ones = int'(x) + int'(y) + int'(z);
      #1;
      checks++;
      if (s !== ones[0] || co !== (ones >= 2)) begin
        failures++;
        $display("FAIL x=%b y=%b z=%b got s=%b co=%b", x, y, z, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
