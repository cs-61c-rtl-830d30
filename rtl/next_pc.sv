// next_pc: instruction-fetch unit of the single-cycle processor (left part of
// its datapath): the PC register, an adder computing PC+4, the "PC Ext" unit
// and a second adder computing the branch target, and the nPC mux.
//
// Each rising clock edge loads the PC with
//   jump                 : {PC+4[31:28], target26, 2'b00}
//   nPC_sel & Equal      : PC+4 + (sign_ext(imm16) << 2)
//   otherwise            : PC+4
// The +4 adder, the branch adder fed from PC+4, the PC Ext box and the mux
// selected by nPC_sel & Equal are drawn in the lecture's datapath. The jump
// target and its mux are not drawn; they are this design's, using the usual
// MIPS J-type rule. Synchronous reset sets the PC to RESET_PC (0).
module next_pc #(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        npc_sel,
  input  logic        equal,
  input  logic        jump,
  input  logic [15:0] imm16,
  input  logic [25:0] target,
  output logic [31:0] pc
);

  logic [31:0] pc_plus4, pc_ext, br_target, pc_next;

  assign pc_plus4  = pc + 32'd4;
  assign pc_ext    = {{14{imm16[15]}}, imm16, 2'b00};   // PC Ext
  assign br_target = pc_plus4 + pc_ext;

  always_comb begin
    if (jump)                  pc_next = {pc_plus4[31:28], target, 2'b00};
    else if (npc_sel && equal) pc_next = br_target;
    else                       pc_next = pc_plus4;
  end

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= pc_next;
  end

endmodule
