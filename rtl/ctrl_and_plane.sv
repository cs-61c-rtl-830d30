// ctrl_and_plane: the "AND" logic of the main controller, an instruction
// decoder. Each output line is the product term of one instruction's opcode
// bits (op5..op0), and for add and sub also of the function bits
// (func5..func0):
//   rtype = op == 000000, ori = 001101, lw = 100011, sw = 101011,
//   beq = 000100, jump = 000010, add = rtype & func == 100000,
//   sub = rtype & func == 100010.
// At most one line is high; an opcode or function outside the subset raises
// none. The product terms are the lecture's; the module is combinational.
module ctrl_and_plane (
  input  logic [5:0] op,
  input  logic [5:0] func,
  output logic       add,
  output logic       sub,
  output logic       ori,
  output logic       lw,
  output logic       sw,
  output logic       beq,
  output logic       jump
);

  logic rtype;

  always_comb begin
    rtype = ~op[5] & ~op[4] & ~op[3] & ~op[2] & ~op[1] & ~op[0];
    ori   = ~op[5] & ~op[4] &  op[3] &  op[2] & ~op[1] &  op[0];
    lw    =  op[5] & ~op[4] & ~op[3] & ~op[2] &  op[1] &  op[0];
    sw    =  op[5] & ~op[4] &  op[3] & ~op[2] &  op[1] &  op[0];
    beq   = ~op[5] & ~op[4] & ~op[3] &  op[2] & ~op[1] & ~op[0];
    jump  = ~op[5] & ~op[4] & ~op[3] & ~op[2] &  op[1] & ~op[0];
    add   = rtype & func[5] & ~func[4] & ~func[3] & ~func[2] & ~func[1] & ~func[0];
    sub   = rtype & func[5] & ~func[4] & ~func[3] & ~func[2] &  func[1] & ~func[0];
  end

endmodule
