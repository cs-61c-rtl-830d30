// pl_checker: cycle-by-cycle checker for the five-stage pipelined processor.
//
// It records the PC and instruction fetched in every cycle while run is high.
// The instruction fetched in cycle c is in MEM in cycle c+3 and in WB in
// cycle c+4, so in cycle c it executes the instruction fetched in cycle c-3
// on the reference model and checks the data-memory write and the branch
// decision (branch_taken, and the PC fetched in the next cycle: the branch
// target or PC+4) against it; the register write seen in cycle c is checked
// against the effect of the instruction fetched in cycle c-4. Every fetched
// instruction is executed in fetch order, including the three that follow a
// beq, because the pipeline executes them too. A write to register 0 counts
// as no write. This is exact for programs
// in which no instruction reads a register written by one of the two
// instructions fetched just before it. It counts instruction kinds, taken
// branches, full-pipeline cycles and register values passed from a write to
// a read within one cycle (read inside the register file, by hierarchy).
module pl_checker
  import mips_tb_pkg::*;
#(
  parameter int IMEM_AW = 8
) (
  input logic        clk,
  input logic        run,
  input logic [31:0] pc,
  input logic [31:0] instr,
  input logic        branch_taken,
  input logic        reg_we,
  input logic [4:0]  reg_waddr,
  input logic [31:0] reg_wdata,
  input logic        mem_we,
  input logic [31:0] mem_addr,
  input logic [31:0] mem_wdata,
  input logic        rf_wr,       // register file write enable
  input logic [4:0]  rf_rw,
  input logic [4:0]  rf_ra,
  input logic [4:0]  rf_rb
);
  logic [31:0] image [2**IMEM_AW];
  mips_model   m = new();
  logic [31:0] f_pc [$];
  logic [31:0] f_ins [$];
  effect_t     wbq [$];
  logic [31:0] exp_pc;
  int checks = 0, failures = 0, cycles = 0;
  int kinds [8];
  int taken = 0, not_taken = 0, same_cycle_rw = 0, full_cycles = 0, first_write = -1;

  function automatic void start(const ref logic [31:0] img [2**IMEM_AW]);
    image = img;
    m.reset();
    f_pc.delete(); f_ins.delete(); wbq.delete();
    cycles = 0; exp_pc = 0; first_write = -1;
  endfunction

  task automatic cmp(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("FAIL pipeline %s in cycle %0d: got %h exp %h", what, cycles, got, exp);
    end
  endtask

  always @(negedge clk) begin
    if (run) begin
      effect_t e, w;
      bit      redirect;
      redirect = 0;
      cmp(pc, exp_pc, "fetch pc");
      cmp(instr, image[pc[IMEM_AW+1:2]], "fetched instr");
      f_pc.push_back(pc);
      f_ins.push_back(instr);
      // MEM stage: instruction fetched three cycles ago
      if (cycles >= 3) begin
        m.pc = f_pc[cycles - 3];
        e = m.step(f_ins[cycles - 3]);
        wbq.push_back(e);
        cmp(32'(mem_we), 32'(e.mem_we), "mem_we");
        if (e.mem_we) begin
          cmp(mem_addr, e.maddr, "mem_addr");
          cmp(mem_wdata, e.mwdata, "mem_wdata");
        end
        cmp(32'(branch_taken), 32'(e.is_branch && e.taken), "branch_taken");
        if (e.is_branch && e.taken) begin redirect = 1; exp_pc = e.next_pc; end
        kinds[e.kind]++;
        if (e.is_branch) begin if (e.taken) taken++; else not_taken++; end
      end else begin
        cmp(32'(mem_we), 0, "mem_we while filling");
        cmp(32'(branch_taken), 0, "branch_taken while filling");
      end
      // WB stage: instruction fetched four cycles ago
      if (cycles >= 4) begin
        w = wbq.pop_front();
        cmp(32'(reg_we && reg_waddr != 0), 32'(w.reg_we), "reg_we");
        if (w.reg_we) begin
          cmp(32'(reg_waddr), 32'(w.waddr), "reg_waddr");
          cmp(reg_wdata, w.wdata, "reg_wdata");
          if (first_write < 0) first_write = cycles;
        end
        full_cycles++;
      end else begin
        cmp(32'(reg_we && reg_waddr != 0), 0, "reg_we while filling");
      end
      if (rf_wr && rf_rw != 0 && (rf_rw == rf_ra || rf_rw == rf_rb)) same_cycle_rw++;
      if (!redirect) exp_pc = pc + 4;
      cycles++;
    end
  end
endmodule
