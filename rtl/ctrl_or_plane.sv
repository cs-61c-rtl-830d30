// ctrl_or_plane: the "OR" logic of the main controller. Every control signal
// is the OR of the instruction lines that assert it, as in the lecture's
// Boolean expressions:
//   RegDst = add+sub, ALUSrc = ori+lw+sw, MemtoReg = lw,
//   RegWrite = add+sub+ori+lw, MemWrite = sw, nPCsel = beq, Jump = jump,
//   ExtOp = lw+sw, ALUctr[0] = sub+beq, ALUctr[1] = ori
// (ALUctr 00 ADD, 01 SUB, 10 OR). Don't-care entries of the control table
// therefore come out as 0. Signals asserted by a single instruction
// (MemtoReg, MemWrite, nPCsel, Jump, ALUctr[1]) are that line itself.
// Combinational.
module ctrl_or_plane
  import cpu_pkg::*;
(
  input  logic  add,
  input  logic  sub,
  input  logic  ori,
  input  logic  lw,
  input  logic  sw,
  input  logic  beq,
  input  logic  jump,
  output ctrl_t ctrl
);

  always_comb begin
    ctrl.reg_dst    = add | sub;
    ctrl.alu_src    = ori | lw | sw;
    ctrl.mem_to_reg = lw;
    ctrl.reg_write  = add | sub | ori | lw;
    ctrl.mem_write  = sw;
    ctrl.npc_sel    = beq;
    ctrl.jump       = jump;
    ctrl.ext_op     = lw | sw;
    ctrl.alu_ctr    = alu_op_e'({ori, sub | beq});
  end

endmodule
