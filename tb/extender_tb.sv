// extender_tb: checks zero extension (ExtOp=0) and sign extension (ExtOp=1)
// of all 65536 immediates against values computed from integer arithmetic.
module extender_tb;
  logic [15:0] imm;
  logic        ext_op;
  logic [31:0] out, exp;
  int checks = 0, failures = 0;

  extender dut (.imm16(imm), .ext_op(ext_op), .imm32(out));

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      for (int s = 0; s < 2; s++) begin
        imm = 16'(v); ext_op = s[0];
        #1;
        exp = (s == 1 && v >= 32768) ? 32'(v - 65536) : 32'(v);
        checks++;
        if (out !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL imm=%h ext=%0d got %h exp %h", imm, s, out, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
