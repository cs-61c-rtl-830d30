// alu: the datapath ALU of both processors.
//
// Computes A+B, A-B or A|B as selected by ALUctr (00 ADD, 01 SUB, 10 OR; the
// code 11 is not used by the controller and also performs OR, since the
// controller equations drive bit 1 only for ori). Zero is high when the result
// is all zeros; with SUB this is the "Equal" condition beq uses. Purely
// combinational. The three operations and the encoding follow the lecture's
// control-signal definitions; the Zero output follows the pipelined datapath
// figure, and using it as Equal for the single-cycle branch is this design's
// choice.
module alu
  import cpu_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_e          alu_ctr,
  output logic [WIDTH-1:0] result,
  output logic             zero
);

  always_comb begin
    unique case (alu_ctr)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      default: result = a | b;
    endcase
  end

  assign zero = (result == '0);

endmodule
