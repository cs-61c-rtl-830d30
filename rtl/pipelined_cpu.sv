// pipelined_cpu: the five-stage pipelined MIPS-subset processor
// (add, sub, ori, lw, sw, beq).
//
// The single-cycle work is cut into five stages separated by pipeline
// registers, so up to five instructions are in flight and one completes per
// cycle once the pipeline is full; each instruction takes five cycles.
//   IF  : the PC addresses the instruction memory; PC+4 is formed.
//   ID  : the controller decodes; rs/rt read the register file; Imm16 is
//         extended; the destination register number (rd or rt by RegDst) is
//         chosen here and travels down the pipeline with the instruction, so
//         that write-back uses the number of the instruction being written
//         back, not of the one in ID.
//   EX  : the ALU operates on read data 1 and read data 2 or the immediate
//         (ALUSrc); a separate adder forms the branch target
//         PC+4 + (sign_ext(Imm16) << 2).
//   MEM : the data memory is read or written at the ALU result address; a
//         beq whose ALU Zero is set selects the branch target for the PC
//         (PCSrc), which takes effect at the next edge.
//   WB  : MemtoReg picks the memory data or the ALU result and it is written
//         to the register file.
// The register file writes before it reads within a cycle ("left half write,
// right half read"), so an instruction in ID sees a value written back in
// the same cycle.
//
// Stage contents, the pipeline registers, the branch resolved in MEM and the
// destination number carried to WB follow the lecture's datapath figures. The
// lecture covers no hazard handling: there is no forwarding, no stall and no
// flush. A result is visible to an instruction three or more slots later, and
// the three instructions after a beq are always executed. Control signals
// travelling with the instruction in ID/EX, EX/MEM and MEM/WB, the ExtOp
// extender in place of a plain sign-extender (needed for ori) with the
// branch offset always sign-extended, and the
// absence of the jump instruction (the figures draw no jump path; j is
// decoded as doing nothing) are this design's reading.
//
// Ports: as single_cycle_cpu, plus branch_taken (PCSrc, high in the cycle a
// taken beq is in MEM). Reset (synchronous, active high) clears the PC, the
// pipeline registers (bubbles), the register file and the data memory.
module pipelined_cpu
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
  output logic               branch_taken,
  output logic               reg_we,
  output logic [4:0]         reg_waddr,
  output logic [31:0]        reg_wdata,
  output logic               mem_we,
  output logic [31:0]        mem_addr,
  output logic [31:0]        mem_wdata
);

  if_id_t  if_id_d,  if_id_q;
  id_ex_t  id_ex_d,  id_ex_q;
  ex_mem_t ex_mem_d, ex_mem_q;
  mem_wb_t mem_wb_d, mem_wb_q;

  // ---------------- IF ----------------
  logic [31:0] pc_plus4, pc_next;
  logic        pc_src;

  assign pc_plus4 = pc + 32'd4;
  assign pc_src   = ex_mem_q.branch & ex_mem_q.zero;
  assign pc_next  = pc_src ? ex_mem_q.branch_target : pc_plus4;

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= pc_next;
  end

  instruction_memory #(.AW(IMEM_AW)) u_imem (
    .clk      (clk),
    .load_en  (imem_load_en),
    .load_addr(imem_load_addr),
    .load_data(imem_load_data),
    .addr     (pc),
    .instr    (instr)
  );

  assign if_id_d = '{pc_plus4: pc_plus4, instr: instr};

  pipe_reg #(.T(if_id_t)) u_if_id (.clk(clk), .rst(rst), .d(if_id_d), .q(if_id_q));

  // ---------------- ID ----------------
  instr_t      ir;
  ctrl_t       ctrl;
  logic [6:0]  lines;
  logic [31:0] rd1, rd2, imm32, wb_data;

  assign ir = instr_t'(if_id_q.instr);

  controller u_ctrl (
    .op   (ir.op),
    .func (ir.funct),
    .ctrl (ctrl),
    .lines(lines)
  );

  regfile #(.WRITE_FIRST(1'b1)) u_rf (
    .clk   (clk),
    .rst   (rst),
    .reg_wr(mem_wb_q.reg_write),
    .rw    (mem_wb_q.write_reg),
    .bus_w (wb_data),
    .ra    (ir.rs),
    .rb    (ir.rt),
    .bus_a (rd1),
    .bus_b (rd2)
  );

  extender u_ext (
    .imm16 (if_id_q.instr[15:0]),
    .ext_op(ctrl.ext_op),
    .imm32 (imm32)
  );

  always_comb begin
    id_ex_d            = '0;
    id_ex_d.reg_write  = ctrl.reg_write;
    id_ex_d.mem_to_reg = ctrl.mem_to_reg;
    id_ex_d.mem_write  = ctrl.mem_write;
    id_ex_d.branch     = ctrl.npc_sel;
    id_ex_d.alu_src    = ctrl.alu_src;
    id_ex_d.alu_ctr    = ctrl.alu_ctr;
    id_ex_d.pc_plus4   = if_id_q.pc_plus4;
    id_ex_d.read_data1 = rd1;
    id_ex_d.read_data2 = rd2;
    id_ex_d.imm32      = imm32;
    id_ex_d.write_reg  = ctrl.reg_dst ? ir.rd : ir.rt;
  end

  pipe_reg #(.T(id_ex_t)) u_id_ex (.clk(clk), .rst(rst), .d(id_ex_d), .q(id_ex_q));

  // ---------------- EX ----------------
  logic [31:0] alu_b, alu_out;
  logic        zero;

  assign alu_b = id_ex_q.alu_src ? id_ex_q.imm32 : id_ex_q.read_data2;

  alu u_alu (
    .a      (id_ex_q.read_data1),
    .b      (alu_b),
    .alu_ctr(id_ex_q.alu_ctr),
    .result (alu_out),
    .zero   (zero)
  );

  always_comb begin
    ex_mem_d               = '0;
    ex_mem_d.reg_write     = id_ex_q.reg_write;
    ex_mem_d.mem_to_reg    = id_ex_q.mem_to_reg;
    ex_mem_d.mem_write     = id_ex_q.mem_write;
    ex_mem_d.branch        = id_ex_q.branch;
    ex_mem_d.zero          = zero;
    // Shift left 2 of the sign-extended offset (ExtOp is a don't-care for beq,
    // so the offset is sign-extended here from the low 16 bits)
    ex_mem_d.branch_target = id_ex_q.pc_plus4 + {{14{id_ex_q.imm32[15]}}, id_ex_q.imm32[15:0], 2'b00};
    ex_mem_d.alu_result    = alu_out;
    ex_mem_d.write_data    = id_ex_q.read_data2;
    ex_mem_d.write_reg     = id_ex_q.write_reg;
  end

  pipe_reg #(.T(ex_mem_t)) u_ex_mem (.clk(clk), .rst(rst), .d(ex_mem_d), .q(ex_mem_q));

  // ---------------- MEM ----------------
  logic [31:0] mem_out;

  data_memory #(.AW(DMEM_AW)) u_dmem (
    .clk     (clk),
    .rst     (rst),
    .wr_en   (ex_mem_q.mem_write),
    .adr     (ex_mem_q.alu_result),
    .data_in (ex_mem_q.write_data),
    .data_out(mem_out)
  );

  always_comb begin
    mem_wb_d            = '0;
    mem_wb_d.reg_write  = ex_mem_q.reg_write;
    mem_wb_d.mem_to_reg = ex_mem_q.mem_to_reg;
    mem_wb_d.read_data  = mem_out;
    mem_wb_d.alu_result = ex_mem_q.alu_result;
    mem_wb_d.write_reg  = ex_mem_q.write_reg;
  end

  pipe_reg #(.T(mem_wb_t)) u_mem_wb (.clk(clk), .rst(rst), .d(mem_wb_d), .q(mem_wb_q));

  // ---------------- WB ----------------
  assign wb_data = mem_wb_q.mem_to_reg ? mem_wb_q.read_data : mem_wb_q.alu_result;

  assign branch_taken = pc_src;
  assign reg_we       = mem_wb_q.reg_write & ~rst;
  assign reg_waddr    = mem_wb_q.write_reg;
  assign reg_wdata    = wb_data;
  assign mem_we       = ex_mem_q.mem_write & ~rst;
  assign mem_addr     = ex_mem_q.alu_result;
  assign mem_wdata    = ex_mem_q.write_data;

endmodule
