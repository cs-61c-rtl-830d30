// cs61c_top: the two processors of the design side by side, each with its
// own ports: the single-cycle processor (sc_*) and the five-stage pipelined
// processor (pl_*). Both implement the same MIPS subset and share the same
// building blocks (controller, ALU, register file, extender, memories); they
// do not interact. Each has its own instruction-memory load port, used while
// rst is held, and exposes its PC, fetched instruction and architectural
// writes. One rst resets both.
module cs61c_top
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_AW = 8,
  parameter int unsigned DMEM_AW = 8
) (
  input  logic               clk,
  input  logic               rst,
  // single-cycle processor
  input  logic               sc_imem_load_en,
  input  logic [IMEM_AW-1:0] sc_imem_load_addr,
  input  logic [31:0]        sc_imem_load_data,
  output logic [31:0]        sc_pc,
  output logic [31:0]        sc_instr,
  output logic               sc_reg_we,
  output logic [4:0]         sc_reg_waddr,
  output logic [31:0]        sc_reg_wdata,
  output logic               sc_mem_we,
  output logic [31:0]        sc_mem_addr,
  output logic [31:0]        sc_mem_wdata,
  // pipelined processor
  input  logic               pl_imem_load_en,
  input  logic [IMEM_AW-1:0] pl_imem_load_addr,
  input  logic [31:0]        pl_imem_load_data,
  output logic [31:0]        pl_pc,
  output logic [31:0]        pl_instr,
  output logic               pl_branch_taken,
  output logic               pl_reg_we,
  output logic [4:0]         pl_reg_waddr,
  output logic [31:0]        pl_reg_wdata,
  output logic               pl_mem_we,
  output logic [31:0]        pl_mem_addr,
  output logic [31:0]        pl_mem_wdata
);

  single_cycle_cpu #(.IMEM_AW(IMEM_AW), .DMEM_AW(DMEM_AW)) u_sc (
    .clk           (clk),
    .rst           (rst),
    .imem_load_en  (sc_imem_load_en),
    .imem_load_addr(sc_imem_load_addr),
    .imem_load_data(sc_imem_load_data),
    .pc            (sc_pc),
    .instr         (sc_instr),
    .reg_we        (sc_reg_we),
    .reg_waddr     (sc_reg_waddr),
    .reg_wdata     (sc_reg_wdata),
    .mem_we        (sc_mem_we),
    .mem_addr      (sc_mem_addr),
    .mem_wdata     (sc_mem_wdata)
  );

  pipelined_cpu #(.IMEM_AW(IMEM_AW), .DMEM_AW(DMEM_AW)) u_pl (
    .clk           (clk),
    .rst           (rst),
    .imem_load_en  (pl_imem_load_en),
    .imem_load_addr(pl_imem_load_addr),
    .imem_load_data(pl_imem_load_data),
    .pc            (pl_pc),
    .instr         (pl_instr),
    .branch_taken  (pl_branch_taken),
    .reg_we        (pl_reg_we),
    .reg_waddr     (pl_reg_waddr),
    .reg_wdata     (pl_reg_wdata),
    .mem_we        (pl_mem_we),
    .mem_addr      (pl_mem_addr),
    .mem_wdata     (pl_mem_wdata)
  );

endmodule
