// ctrl_or_plane_tb: checks the OR plane row by row against the control
// table (one instruction line high at a time, don't-cares expected as 0),
// with no line high, and with random combinations of lines, where every
// signal must be the OR of the rows of the lines that are high.
module ctrl_or_plane_tb;
  import cpu_pkg::*;
  logic  [6:0] l;   // {jump, beq, sw, lw, ori, sub, add}
  ctrl_t       ctrl;
  logic [9:0]  rows [7];
  logic [9:0]  exp;
  int checks = 0, failures = 0;

  ctrl_or_plane dut (.add(l[0]), .sub(l[1]), .ori(l[2]), .lw(l[3]), .sw(l[4]), .beq(l[5]),
                     .jump(l[6]), .ctrl(ctrl));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    //          RegDst ALUSrc MemtoReg RegWrite MemWrite nPCsel Jump ExtOp ALUctr[1:0]
    rows[0] = 10'b1_0_0_1_0_0_0_0_00;   // add
    rows[1] = 10'b1_0_0_1_0_0_0_0_01;   // sub
    rows[2] = 10'b0_1_0_1_0_0_0_0_10;   // ori
    rows[3] = 10'b0_1_1_1_0_0_0_1_00;   // lw
    rows[4] = 10'b0_1_0_0_1_0_0_1_00;   // sw
    rows[5] = 10'b0_0_0_0_0_1_0_0_01;   // beq
    rows[6] = 10'b0_0_0_0_0_0_1_0_00;   // jump
    for (int i = -1; i < 200; i++) begin
      if (i < 0)      l = '0;
      else if (i < 7) l = 7'(1 << i);
      else            l = 7'($urandom);
      #1;
      exp = '0;
      for (int k = 0; k < 7; k++) if (l[k]) exp |= rows[k];
      checks++;
      if (ctrl !== exp) begin
        failures++;
        $display("FAIL lines=%b ctrl=%b exp %b", l, ctrl, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
