// Self-checking testbench for ksa: every 6-bit operand pair with both carry
// ins (exhaustive), plus random 15-bit additions, checked against integer
// addition. Widths 6 and 15 exercise three and four prefix levels.
module tb_ksa;

  int checks = 0, failures = 0;

  logic [5:0]  a6, b6, s6;
  logic        ci6, co6;
  logic [14:0] a15, b15, s15;
  logic        ci15, co15;

  ksa #(.W(6))  dut6  (.a(a6),  .b(b6),  .ci(ci6),  .s(s6),  .co(co6));
  ksa #(.W(15)) dut15 (.a(a15), .b(b15), .ci(ci15), .s(s15), .co(co15));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 13); v++) begin
      {ci6, a6, b6} = 13'(v);
      #1;
      checks++;
      if ({co6, s6} !== 7'(int'(a6) + int'(b6) + int'(ci6))) begin
        failures++;
        $display("FAIL W=6 %0d+%0d+%0d got %0d", a6, b6, ci6, {co6, s6});
      end
    end
    for (int n = 0; n < 5000; n++) begin
      a15 = 15'($urandom); b15 = 15'($urandom); ci15 = 1'($urandom);
      if (n == 0) begin a15 = '1; b15 = '0; ci15 = 1'b1; end  // full carry ripple
      #1;
      checks++;
      if ({co15, s15} !== 16'(int'(a15) + int'(b15) + int'(ci15))) begin
        failures++;
        $display("FAIL W=15 %0d+%0d+%0d got %0d", a15, b15, ci15, {co15, s15});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
