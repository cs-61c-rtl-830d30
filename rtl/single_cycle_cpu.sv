// single_cycle_cpu: the single-cycle MIPS-subset processor (add, sub, ori,
// lw, sw, beq, j). Every instruction is fetched, decoded, executed, and
// written back within one clock cycle, so CPI is 1 and the clock period must
// cover the slowest instruction (lw).
//
// Datapath, as drawn in the lecture: the PC addresses the instruction memory;
// rs and rt read busA and busB from the register file; the RegDst mux picks
// rd (1) or rt (0) as Rw; the Extender widens Imm16 under ExtOp; the ALUSrc mux
// feeds busB (0) or the immediate (1) to the ALU; the ALU result is the data
// memory address and busB its Data In; the MemtoReg mux writes back the ALU
// result (0) or the memory data (1) on busW. The next_pc unit takes the branch
// when nPC_sel & Equal, Equal being the ALU's Zero under SUB. All control
// comes from the controller. The register file writes, the data memory
// writes and the PC updates at the same rising edge.
//
// Ports: clk, rst (synchronous, active high; clears PC, registers and data
// memory). imem_load_* write the instruction memory while rst is held. The
// remaining outputs expose each cycle's PC, instruction and architectural
// writes for observation. Memory sizes (2**IMEM_AW and 2**DMEM_AW words) are
// this design's choice.
module single_cycle_cpu
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_AW = 8,
  parameter int unsigned DMEM_AW = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               imem_load_en,
  input  logic [IMEM_AW-1:0] imem_load_addr,
  input  logic [31:0]        imem_load_data,
  output logic [31:0]        pc,
  output logic [31:0]        instr,
  output logic               reg_we,
  output logic [4:0]         reg_waddr,
  output logic [31:0]        reg_wdata,
  output logic               mem_we,
  output logic [31:0]        mem_addr,
  output logic [31:0]        mem_wdata
);

  instr_t      ir;
  ctrl_t       ctrl;
  logic [6:0]  lines;
  logic [4:0]  rw;
  logic [31:0] bus_a, bus_b, bus_w, imm32, alu_b, alu_out, mem_out;
  logic        zero;

  instruction_memory #(.AW(IMEM_AW)) u_imem (
    .clk      (clk),
    .load_en  (imem_load_en),
    .load_addr(imem_load_addr),
    .load_data(imem_load_data),
    .addr     (pc),
    .instr    (instr)
  );

  assign ir = instr_t'(instr);

  controller u_ctrl (
    .op   (ir.op),
    .func (ir.funct),
    .ctrl (ctrl),
    .lines(lines)
  );

  next_pc u_npc (
    .clk    (clk),
    .rst    (rst),
    .npc_sel(ctrl.npc_sel),
    .equal  (zero),
    .jump   (ctrl.jump),
    .imm16  (instr[15:0]),
    .target (instr[25:0]),
    .pc     (pc)
  );

  assign rw = ctrl.reg_dst ? ir.rd : ir.rt;

  regfile #(.WRITE_FIRST(1'b0)) u_rf (
    .clk   (clk),
    .rst   (rst),
    .reg_wr(ctrl.reg_write),
    .rw    (rw),
    .bus_w (bus_w),
    .ra    (ir.rs),
    .rb    (ir.rt),
    .bus_a (bus_a),
    .bus_b (bus_b)
  );

  extender u_ext (
    .imm16 (instr[15:0]),
    .ext_op(ctrl.ext_op),
    .imm32 (imm32)
  );

  assign alu_b = ctrl.alu_src ? imm32 : bus_b;

  alu u_alu (
    .a      (bus_a),
    .b      (alu_b),
    .alu_ctr(ctrl.alu_ctr),
    .result (alu_out),
    .zero   (zero)
  );

  data_memory #(.AW(DMEM_AW)) u_dmem (
    .clk     (clk),
    .rst     (rst),
    .wr_en   (ctrl.mem_write),
    .adr     (alu_out),
    .data_in (bus_b),
    .data_out(mem_out)
  );

  assign bus_w = ctrl.mem_to_reg ? mem_out : alu_out;

  assign reg_we    = ctrl.reg_write & ~rst;
  assign reg_waddr = rw;
  assign reg_wdata = bus_w;
  assign mem_we    = ctrl.mem_write & ~rst;
  assign mem_addr  = alu_out;
  assign mem_wdata = bus_b;

endmodule
