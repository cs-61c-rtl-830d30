// cpu_pkg: types and constants shared by the single-cycle and the pipelined
// MIPS-subset processors.
//
// The subset is add, sub, ori, lw, sw, beq and j. Opcode and function-field
// values are the ones in the control-signal summary table; the instruction
// field positions are those of the R-, I- and J-type formats (op 31:26,
// rs 25:21, rt 20:16, rd 15:11, shamt 10:6, funct 5:0, immediate 15:0,
// target 25:0). The 2-bit ALU control encoding 00 ADD, 01 SUB, 10 OR is the
// one the controller equations assume.
package cpu_pkg;

  // Opcodes (instruction bits 31:26)
  localparam logic [5:0] OP_RTYPE = 6'b00_0000;
  localparam logic [5:0] OP_ORI   = 6'b00_1101;
  localparam logic [5:0] OP_LW    = 6'b10_0011;
  localparam logic [5:0] OP_SW    = 6'b10_1011;
  localparam logic [5:0] OP_BEQ   = 6'b00_0100;
  localparam logic [5:0] OP_J     = 6'b00_0010;

  // Function field (instruction bits 5:0) of R-type instructions
  localparam logic [5:0] FN_ADD   = 6'b10_0000;
  localparam logic [5:0] FN_SUB   = 6'b10_0010;

  // ALU operation, ALUctr
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_OR  = 2'b10
  } alu_op_e;

  // Control signals produced by the controller's OR plane
  typedef struct packed {
    logic    reg_dst;    // 0: write rt, 1: write rd
    logic    alu_src;    // 0: busB, 1: extended immediate
    logic    mem_to_reg; // 0: ALU result, 1: memory read data
    logic    reg_write;  // write the register file
    logic    mem_write;  // write data memory
    logic    npc_sel;    // branch (taken when the ALU reports Equal)
    logic    jump;       // jump to the J-type target
    logic    ext_op;     // 0: zero-extend, 1: sign-extend Imm16
    alu_op_e alu_ctr;    // ALU operation
  } ctrl_t;

  // Instruction word in its R-type view (I- and J-type fields overlap it)
  typedef struct packed {
    logic [5:0] op;
    logic [4:0] rs;
    logic [4:0] rt;
    logic [4:0] rd;
    logic [4:0] shamt;
    logic [5:0] funct;
  } instr_t;

  // IF/ID pipeline register
  typedef struct packed {
    logic [31:0] pc_plus4;
    logic [31:0] instr;
  } if_id_t;

  // ID/EX pipeline register: control for EX, MEM and WB plus operands
  typedef struct packed {
    logic        reg_write;
    logic        mem_to_reg;
    logic        mem_write;
    logic        branch;
    logic        alu_src;
    alu_op_e     alu_ctr;
    logic [31:0] pc_plus4;
    logic [31:0] read_data1;
    logic [31:0] read_data2;
    logic [31:0] imm32;
    logic [4:0]  write_reg;
  } id_ex_t;

  // EX/MEM pipeline register
  typedef struct packed {
    logic        reg_write;
    logic        mem_to_reg;
    logic        mem_write;
    logic        branch;
    logic        zero;
    logic [31:0] branch_target;
    logic [31:0] alu_result;
    logic [31:0] write_data;
    logic [4:0]  write_reg;
  } ex_mem_t;

  // MEM/WB pipeline register
  typedef struct packed {
    logic        reg_write;
    logic        mem_to_reg;
    logic [31:0] read_data;
    logic [31:0] alu_result;
    logic [4:0]  write_reg;
  } mem_wb_t;

endpackage
