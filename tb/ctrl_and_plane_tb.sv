// ctrl_and_plane_tb: drives all 4096 opcode/function combinations into the
// AND plane and checks that exactly the line of the matching instruction is
// high (opcode values from the control table), and none for the rest.
module ctrl_and_plane_tb;
  logic [5:0] op, func;
  logic       add, sub, ori, lw, sw, beq, jump;
  logic [6:0] got, exp;
  int checks = 0, failures = 0;

  ctrl_and_plane dut (.op(op), .func(func), .add(add), .sub(sub), .ori(ori), .lw(lw),
                      .sw(sw), .beq(beq), .jump(jump));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int o = 0; o < 64; o++) begin
      for (int f = 0; f < 64; f++) begin
        op = 6'(o); func = 6'(f);
        #1;
        got = {jump, beq, sw, lw, ori, sub, add};
        exp = '0;
        if (o == 0 && f == 'h20) exp[0] = 1;
        if (o == 0 && f == 'h22) exp[1] = 1;
        if (o == 'h0d) exp[2] = 1;
        if (o == 'h23) exp[3] = 1;
        if (o == 'h2b) exp[4] = 1;
        if (o == 'h04) exp[5] = 1;
        if (o == 'h02) exp[6] = 1;
        checks++;
        if (got !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL op=%b func=%b lines=%b exp %b", op, func, got, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
