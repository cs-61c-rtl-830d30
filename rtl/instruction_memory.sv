// instruction_memory: the instruction store of both processors.
//
// The read port takes the byte address from the PC (Inst Address) and
// returns the 32-bit word at bits [AW+1:2], combinationally. The lecture
// treats the memory as read-only; a write port (load_en/load_addr/load_data,
// word address, clocked) is this design's way of placing a program in it
// before the processor runs. 256 words is this design's choice of size.
module instruction_memory #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          load_en,
  input  logic [AW-1:0] load_addr,
  input  logic [31:0]   load_data,
  input  logic [31:0]   addr,
  output logic [31:0]   instr
);

  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (load_en) mem[load_addr] <= load_data;
  end

  assign instr = mem[addr[AW+1:2]];

endmodule
