// sc_checker: cycle-by-cycle checker for the single-cycle processor.
//
// While run is high it executes, on every falling clock edge, the instruction
// at the reference model's PC (taken from the program image loaded with
// start()) and compares the processor's PC, fetched instruction and the
// register-file and data-memory writes of that cycle with the model's (a
// write to register 0 counts as no write). One
// instruction per cycle is thus checked as well. It counts each instruction
// kind retired and taken and untaken branches.
module sc_checker
  import mips_tb_pkg::*;
#(
  parameter int IMEM_AW = 8
) (
  input logic        clk,
  input logic        run,
  input logic [31:0] pc,
  input logic [31:0] instr,
  input logic        reg_we,
  input logic [4:0]  reg_waddr,
  input logic [31:0] reg_wdata,
  input logic        mem_we,
  input logic [31:0] mem_addr,
  input logic [31:0] mem_wdata
);
  logic [31:0] image [2**IMEM_AW];
  mips_model   m = new();
  int checks = 0, failures = 0, cycles = 0;
  int kinds [8];
  int taken = 0, not_taken = 0;

  function automatic void start(const ref logic [31:0] img [2**IMEM_AW]);
    image = img;
    m.reset();
    cycles = 0;
  endfunction

  task automatic cmp(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("FAIL single-cycle %s at pc=%h: got %h exp %h", what, m.pc, got, exp);
    end
  endtask

  always @(negedge clk) begin
    if (run) begin
      logic [31:0] ins;
      effect_t     e;
      ins = image[m.pc[IMEM_AW+1:2]];
      cmp(pc, m.pc, "pc");
      cmp(instr, ins, "instr");
      e = m.step(ins);
      cmp(32'(reg_we && reg_waddr != 0), 32'(e.reg_we), "reg_we");
      if (e.reg_we) begin
        cmp(32'(reg_waddr), 32'(e.waddr), "reg_waddr");
        cmp(reg_wdata, e.wdata, "reg_wdata");
      end
      cmp(32'(mem_we), 32'(e.mem_we), "mem_we");
      if (e.mem_we) begin
        cmp(mem_addr, e.maddr, "mem_addr");
        cmp(mem_wdata, e.mwdata, "mem_wdata");
      end
      kinds[e.kind]++;
      if (e.is_branch) begin if (e.taken) taken++; else not_taken++; end
      cycles++;
    end
  end
endmodule
