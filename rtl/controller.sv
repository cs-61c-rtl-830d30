// controller: main control of the MIPS-subset processors, built the way the
// lecture builds it, as two logic planes in series.
//
// The "AND" plane (ctrl_and_plane) turns the opcode and, for R-type
// instructions, the function field into one line per instruction: add, sub,
// ori, lw, sw, beq, jump. The "OR" plane (ctrl_or_plane) forms each control
// signal as the sum of the lines that assert it. An instruction outside the
// subset raises no line, so it writes nothing and does not branch. Purely
// combinational; the decoded lines are also brought out for observation as
// {jump, beq, sw, lw, ori, sub, add}. An assertion checks that at most one
// line is high.
module controller
  import cpu_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] func,
  output ctrl_t      ctrl,
  output logic [6:0] lines
);

  logic add, sub, ori, lw, sw, beq, jump;

  ctrl_and_plane u_and (
    .op(op), .func(func),
    .add(add), .sub(sub), .ori(ori), .lw(lw), .sw(sw), .beq(beq), .jump(jump)
  );

  ctrl_or_plane u_or (
    .add(add), .sub(sub), .ori(ori), .lw(lw), .sw(sw), .beq(beq), .jump(jump),
    .ctrl(ctrl)
  );

  assign lines = {jump, beq, sw, lw, ori, sub, add};

  // The AND plane decodes at most one instruction at a time
  always_comb begin
    assert ($onehot0(lines)) else $error("controller: more than one instruction line high: %b", lines);
  end

endmodule
