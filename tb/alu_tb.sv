// alu_tb: checks ADD, SUB and OR and the Zero output of the ALU on directed
// corner values and random operands against arithmetic computed here.
module alu_tb;
  import cpu_pkg::*;
  logic [31:0] a, b, result;
  alu_op_e     op;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .alu_ctr(op), .result(result), .zero(zero));

  task automatic check(logic [31:0] xa, logic [31:0] xb, alu_op_e xop);
    logic [31:0] exp;
    a = xa; b = xb; op = xop;
    #1;
    case (xop)
      ALU_ADD: exp = xa + xb;
      ALU_SUB: exp = xa - xb;
      default: exp = xa | xb;
    endcase
    checks += 2;
    if (result !== exp) begin failures++; $display("FAIL op=%0d a=%h b=%h got %h exp %h", xop, xa, xb, result, exp); end
    if (zero !== (exp == 0)) begin failures++; $display("FAIL zero op=%0d a=%h b=%h", xop, xa, xb); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    check(32'd5, 32'd7, ALU_ADD);
    check(32'hffff_ffff, 32'd1, ALU_ADD);        // wraps to zero
    check(32'd9, 32'd9, ALU_SUB);                // equal: zero set
    check(32'd3, 32'd9, ALU_SUB);
    check(32'h0000_f0f0, 32'h0f0f_0000, ALU_OR);
    check(32'h0, 32'h0, ALU_OR);
    for (int i = 0; i < 300; i++)
      check($urandom, (i % 4 == 0) ? a : $urandom, alu_op_e'($urandom_range(2)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
