// controller_tb: checks the controller against the control-signal table,
// entered here row by row for add, sub, ori, lw, sw, beq and j (don't-care
// entries are expected as 0, as the Boolean equations give them), and checks
// that every other opcode or R-type function asserts nothing.
module controller_tb;
  import cpu_pkg::*;
  logic [5:0] op, func;
  ctrl_t      ctrl;
  logic [6:0] lines;
  int checks = 0, failures = 0;

  controller dut (.op(op), .func(func), .ctrl(ctrl), .lines(lines));

  // RegDst ALUSrc MemtoReg RegWrite MemWrite nPCsel Jump ExtOp ALUctr
  function automatic ctrl_t row(bit rd, bit as, bit m2r, bit rw, bit mw, bit npc, bit j, bit ext, alu_op_e ac);
    ctrl_t c;
    c.reg_dst = rd; c.alu_src = as; c.mem_to_reg = m2r; c.reg_write = rw; c.mem_write = mw;
    c.npc_sel = npc; c.jump = j; c.ext_op = ext; c.alu_ctr = ac;
    return c;
  endfunction

  task automatic check(logic [5:0] xop, logic [5:0] xfn, ctrl_t exp, logic [6:0] exp_lines, string name);
    op = xop; func = xfn; #1;
    checks += 2;
    if (ctrl !== exp) begin failures++; $display("FAIL %s op=%b fn=%b ctrl=%b exp=%b", name, xop, xfn, ctrl, exp); end
    if (lines !== exp_lines) begin failures++; $display("FAIL %s lines=%b exp=%b", name, lines, exp_lines); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    check(6'b000000, 6'b100000, row(1,0,0,1,0,0,0,0,ALU_ADD), 7'b0000001, "add");
    check(6'b000000, 6'b100010, row(1,0,0,1,0,0,0,0,ALU_SUB), 7'b0000010, "sub");
    check(6'b001101, 6'($urandom), row(0,1,0,1,0,0,0,0,ALU_OR), 7'b0000100, "ori");
    check(6'b100011, 6'($urandom), row(0,1,1,1,0,0,0,1,ALU_ADD), 7'b0001000, "lw");
    check(6'b101011, 6'($urandom), row(0,1,0,0,1,0,0,1,ALU_ADD), 7'b0010000, "sw");
    check(6'b000100, 6'($urandom), row(0,0,0,0,0,1,0,0,ALU_SUB), 7'b0100000, "beq");
    check(6'b000010, 6'($urandom), row(0,0,0,0,0,0,1,0,ALU_ADD), 7'b1000000, "jump");
    for (int o = 0; o < 64; o++) begin
      for (int f = 0; f < 64; f++) begin
        logic known;
        known = (o == 6'h0d || o == 6'h23 || o == 6'h2b || o == 6'h04 || o == 6'h02 ||
                 (o == 0 && (f == 6'h20 || f == 6'h22)));
        if (!known) check(6'(o), 6'(f), '0, '0, "other");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
