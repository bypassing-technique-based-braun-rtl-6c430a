// Self-checking testbench for braun_col_bypass.
//
// Six instances: 4 and 8 bits with each final adder, checked over every
// operand pair, and the default 16-bit design with each final adder, checked
// on directed operands (zero, all ones, single and walking bits, the values
// of the document's simulation runs) and on random operands of random bit
// density, so that anything from no column to every column is bypassed. Expected
// products come from integer multiplication.
module tb_braun_col_bypass;
  import braun_pkg::*;

  int checks = 0, failures = 0;
  int bypassed_cols = 0;   // columns switched off, summed over 16-bit operands

  logic [3:0]  a4, b4;
  logic [7:0]  a8, b8;
  logic [15:0] a16, b16;
  logic [7:0]  p4r, p4k;
  logic [15:0] p8r, p8k;
  logic [31:0] p16r, p16k;

  braun_col_bypass #(.N(4),  .ADDER(ADDER_RCA)) dut4r  (.a(a4),  .b(b4),  .p(p4r));
  braun_col_bypass #(.N(4),  .ADDER(ADDER_KSA)) dut4k  (.a(a4),  .b(b4),  .p(p4k));
  braun_col_bypass #(.N(8),  .ADDER(ADDER_RCA)) dut8r  (.a(a8),  .b(b8),  .p(p8r));
  braun_col_bypass #(.N(8),  .ADDER(ADDER_KSA)) dut8k  (.a(a8),  .b(b8),  .p(p8k));
  braun_col_bypass #(.N(16), .ADDER(ADDER_RCA)) dut16r (.a(a16), .b(b16), .p(p16r));
  braun_col_bypass                              dut16k (.a(a16), .b(b16), .p(p16k));

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] exp;
    a16 = x; b16 = y;
    exp = 32'(x) * 32'(y);
    #1;
    checks++;
    if (p16r !== exp || p16k !== exp) begin
      failures++;
      $display("FAIL N=16 %0d*%0d got rca=%0d ksa=%0d exp %0d", x, y, p16r, p16k, exp);
    end
    for (int i = 0; i < 15; i++) if (!x[i]) bypassed_cols++;
  endtask

  initial begin
    // exhaustive 4 x 4
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      checks++;
      if (p4r !== 8'(a4 * b4) || p4k !== 8'(a4 * b4)) begin
        failures++;
        $display("FAIL N=4 %0d*%0d got rca=%0d ksa=%0d", a4, b4, p4r, p4k);
      end
    end
    // exhaustive 8 x 8
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      checks++;
      if (p8r !== 16'(a8) * 16'(b8) || p8k !== 16'(a8) * 16'(b8)) begin
        failures++;
        $display("FAIL N=8 %0d*%0d got rca=%0d ksa=%0d", a8, b8, p8r, p8k);
      end
    end
    // directed 16 x 16, including the operand pairs of the document's runs
    check16(16'd0, 16'd0);
    check16(16'hFFFF, 16'hFFFF);
    check16(16'hFFFF, 16'h0001);
    check16(16'd257, 16'd256);
    check16(16'd256, 16'd257);
    check16(16'd17, 16'd272);
    check16(16'd16, 16'd273);
    check16(16'd1, 16'd16);
    check16(16'd0, 16'd1);
    check16(16'd4369, 16'd4353);
    check16(16'd4352, 16'd4369);
    check16(16'd4353, 16'd1);
    check16(16'd4368, 16'd16);
    for (int i = 0; i < 16; i++)
      for (int k = 0; k < 16; k++) begin
        check16(16'(1) << i, 16'(1) << k);
        check16(~(16'(1) << i), ~(16'(1) << k));
      end
    // random operands of random density
    for (int n = 0; n < 20000; n++) begin
      logic [15:0] x, y;
      x = 16'($urandom); y = 16'($urandom);
      case ($urandom_range(3))
        0: ;
        1: begin x &= 16'($urandom); y &= 16'($urandom); end
        2: begin x |= 16'($urandom); y &= 16'($urandom) & 16'($urandom); end
        default: begin x &= 16'($urandom); y |= 16'($urandom); end
      endcase
      check16(x, y);
    end
    $display("columns bypassed %0d", bypassed_cols);
    checks++;
    if (bypassed_cols == 0) begin
      failures++;
      $display("FAIL column bypass never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
