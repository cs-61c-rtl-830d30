// mips_tb_pkg: testbench support for the MIPS-subset processors.
//
// Holds an instruction encoder for add, sub, ori, lw, sw, beq and j, an
// instruction-set reference model that executes one instruction at a time
// from architectural state kept in plain arrays, and a generator of random
// programs. The model is written from the instruction definitions
// (register transfers), independently of the RTL's datapath and controller.
package mips_tb_pkg;

  localparam logic [31:0] NOP = 32'h0000_0000;

  function automatic logic [31:0] r_type(logic [5:0] funct, int rd, int rs, int rt);
    return {6'b000000, 5'(rs), 5'(rt), 5'(rd), 5'b0, funct};
  endfunction
  function automatic logic [31:0] i_add(int rd, int rs, int rt); return r_type(6'h20, rd, rs, rt); endfunction
  function automatic logic [31:0] i_sub(int rd, int rs, int rt); return r_type(6'h22, rd, rs, rt); endfunction
  function automatic logic [31:0] i_ori(int rt, int rs, int imm); return {6'h0d, 5'(rs), 5'(rt), 16'(imm)}; endfunction
  function automatic logic [31:0] i_lw (int rt, int off, int rs); return {6'h23, 5'(rs), 5'(rt), 16'(off)}; endfunction
  function automatic logic [31:0] i_sw (int rt, int off, int rs); return {6'h2b, 5'(rs), 5'(rt), 16'(off)}; endfunction
  function automatic logic [31:0] i_beq(int rs, int rt, int off); return {6'h04, 5'(rs), 5'(rt), 16'(off)}; endfunction
  function automatic logic [31:0] i_j  (int word_target);        return {6'h02, 26'(word_target)}; endfunction

  // Architectural effect of one instruction
  typedef struct packed {
    logic        reg_we;
    logic [4:0]  waddr;
    logic [31:0] wdata;
    logic        mem_we;
    logic [31:0] maddr;
    logic [31:0] mwdata;
    logic        is_branch;
    logic        taken;
    logic        is_jump;
    logic [31:0] next_pc;
    logic [2:0]  kind;   // 0 other, 1 add, 2 sub, 3 ori, 4 lw, 5 sw, 6 beq, 7 j
  } effect_t;

  class mips_model;
    logic [31:0] regs [32];
    logic [31:0] mem  [int];
    logic [31:0] pc;

    function new();
      reset();
    endfunction

    function void reset();
      foreach (regs[i]) regs[i] = '0;
      mem.delete();
      pc = '0;
    endfunction

    function logic [31:0] rd_mem(logic [31:0] a);
      int w = int'(a[31:2]);
      return mem.exists(w) ? mem[w] : 32'h0;
    endfunction

    // Execute instr as the instruction at address pc and update the state.
    function effect_t step(logic [31:0] instr);
      effect_t e = '0;
      logic [5:0]  op    = instr[31:26];
      logic [4:0]  rs    = instr[25:21];
      logic [4:0]  rt    = instr[20:16];
      logic [4:0]  rd    = instr[15:11];
      logic [31:0] simm  = {{16{instr[15]}}, instr[15:0]};
      logic [31:0] zimm  = {16'h0, instr[15:0]};
      logic [31:0] pc4   = pc + 4;
      e.next_pc = pc4;
      case (op)
        6'h00: begin
          if (instr[5:0] == 6'h20) begin
            e.kind = 1; e.reg_we = 1; e.waddr = rd; e.wdata = regs[rs] + regs[rt];
          end else if (instr[5:0] == 6'h22) begin
            e.kind = 2; e.reg_we = 1; e.waddr = rd; e.wdata = regs[rs] - regs[rt];
          end
        end
        6'h0d: begin e.kind = 3; e.reg_we = 1; e.waddr = rt; e.wdata = regs[rs] | zimm; end
        6'h23: begin e.kind = 4; e.reg_we = 1; e.waddr = rt; e.wdata = rd_mem(regs[rs] + simm); end
        6'h2b: begin e.kind = 5; e.mem_we = 1; e.maddr = regs[rs] + simm; e.mwdata = regs[rt]; end
        6'h04: begin
          e.kind = 6; e.is_branch = 1; e.taken = (regs[rs] == regs[rt]);
          if (e.taken) e.next_pc = pc4 + {simm[29:0], 2'b00};
        end
        6'h02: begin e.kind = 7; e.is_jump = 1; e.next_pc = {pc4[31:28], instr[25:0], 2'b00}; end
        default: ;
      endcase
      if (e.reg_we && e.waddr != 0) regs[e.waddr] = e.wdata;
      if (e.reg_we && e.waddr == 0) e.reg_we = 0;   // a write to $0 changes nothing
      if (e.mem_we) mem[int'(e.maddr[31:2])] = e.mwdata;
      pc = e.next_pc;
      return e;
    endfunction
  endclass

  // Random straight-line program of n instructions (add, sub, ori, lw, sw),
  // data addresses inside the first 2**dmem_aw words. With spacing = 3 no
  // instruction reads a register written by either of the two instructions
  // before it (NOPs are inserted instead), which is what the pipeline without
  // hazard handling needs; spacing = 0 places no such restriction.
  function automatic void random_program(ref logic [31:0] prog[$], input int n,
                                         input int spacing, input int dmem_aw);
    int last_dst[$];
    for (int k = 0; k < n; k++) begin
      int kind = $urandom_range(4);
      int d    = $urandom_range(31, 1);
      int s    = $urandom_range(31);
      int t    = $urandom_range(31);
      int off  = 4 * $urandom_range((1 << dmem_aw) - 1);
      logic [31:0] ins;
      if (kind >= 3) s = 0;   // loads and stores use $0 as base
      if (spacing > 0) begin
        // push NOPs until no source is among the last (spacing-1) destinations
        forever begin
          bit clash = 0;
          for (int j = 0; j < last_dst.size(); j++)
            if (last_dst[j] != 0 && (last_dst[j] == s || last_dst[j] == t)) clash = 1;
          if (!clash) break;
          prog.push_back(NOP);
          last_dst.push_back(0);
          if (last_dst.size() > spacing - 1) void'(last_dst.pop_front());
        end
      end
      case (kind)
        0: ins = i_add(d, s, t);
        1: ins = i_sub(d, s, t);
        2: ins = i_ori(t, s, $urandom_range(16'hffff));
        3: ins = i_lw (t, off, 0);
        default: ins = i_sw(t, off, 0);
      endcase
      prog.push_back(ins);
      last_dst.push_back(kind == 4 ? 0 : (kind <= 1 ? d : t));
      if (last_dst.size() > spacing - 1) void'(last_dst.pop_front());
    end
  endfunction

  localparam int IMG_WORDS = 256;
  typedef logic [31:0] image_t [IMG_WORDS];

  // Destination and source registers of an instruction (0 when none)
  function automatic int dst_of(logic [31:0] ins);
    case (ins[31:26])
      6'h00:        return (ins[5:0] == 6'h20 || ins[5:0] == 6'h22) ? int'(ins[15:11]) : 0;
      6'h0d, 6'h23: return int'(ins[20:16]);
      default:      return 0;
    endcase
  endfunction
  function automatic bit reads(logic [31:0] ins, int r);
    if (r == 0) return 0;
    case (ins[31:26])
      6'h00, 6'h2b, 6'h04: return (int'(ins[25:21]) == r) || (int'(ins[20:16]) == r);
      6'h0d, 6'h23:        return int'(ins[25:21]) == r;
      default:             return 0;
    endcase
  endfunction

  // Insert NOPs into a branch-free program so that no instruction reads a
  // register written by either of the two instructions before it.
  function automatic void pad_hazards(ref logic [31:0] q[$]);
    logic [31:0] out[$];
    foreach (q[k]) begin
      while ((out.size() >= 1 && reads(q[k], dst_of(out[out.size()-1]))) ||
             (out.size() >= 2 && reads(q[k], dst_of(out[out.size()-2]))))
        out.push_back(NOP);
      out.push_back(q[k]);
    end
    q = out;
  endfunction

  // Program image: the program, then a halt loop (beq $0,$0,-1) followed by
  // three NOPs, and NOPs in every other word.
  function automatic void to_image(const ref logic [31:0] q[$], ref image_t img);
    foreach (img[i]) img[i] = NOP;
    foreach (q[i]) img[i] = q[i];
    img[q.size()] = i_beq(0, 0, -1);
  endfunction

  // The array-element swap of the lecture (v[k] <-> v[k+1], v at byte
  // address 64 in $2), with set-up stores before and checking loads after.
  function automatic void prog_swap(ref logic [31:0] q[$]);
    q = {i_ori(8, 0, 16'hAAAA), i_ori(9, 0, 16'h5555), i_ori(2, 0, 64),
         i_sw(8, 0, 2), i_sw(9, 4, 2),
         i_lw(8, 0, 2), i_lw(9, 4, 2), i_sw(9, 0, 2), i_sw(8, 4, 2),  // the swap
         i_lw(10, 0, 2), i_lw(11, 4, 2)};
  endfunction

  // Three independent loads from byte addresses 100, 200 and 300, as in the
  // lecture's pipelined-timing example, after stores that place data there.
  function automatic void prog_three_lw(ref logic [31:0] q[$]);
    q = {i_ori(4, 0, 16'h0111), i_ori(5, 0, 16'h0222), i_ori(6, 0, 16'h0333),
         i_sw(4, 100, 0), i_sw(5, 200, 0), i_sw(6, 300, 0),
         i_lw(1, 100, 0), i_lw(2, 200, 0), i_lw(3, 300, 0)};
  endfunction

  // Directed program for the single-cycle processor: every instruction,
  // zero- and sign-extended immediates, a taken and an untaken beq, a
  // backward-branch counting loop and a jump, with back-to-back dependences.
  function automatic void prog_directed_sc(ref logic [31:0] q[$]);
    q = {i_ori(1, 0, 5),            // 0
         i_ori(2, 0, 5),            // 1
         i_ori(3, 0, 16'hffff),     // 2  zero-extended
         i_add(4, 1, 3),            // 3
         i_sub(5, 1, 4),            // 4  negative result
         i_ori(8, 0, 16),           // 5
         i_sw(4, 8, 0),             // 6
         i_sw(5, -4, 8),            // 7  negative offset: address 12
         i_lw(6, 8, 0),             // 8
         i_lw(9, -4, 8),            // 9
         i_beq(1, 2, 2),            // 10 taken, to 13
         i_ori(10, 0, 1),           // 11 skipped
         i_ori(10, 0, 2),           // 12 skipped
         i_beq(1, 3, 5),            // 13 not taken
         i_ori(11, 0, 3),           // 14 loop counter
         i_ori(12, 0, 1),           // 15
         i_sub(11, 11, 12),         // 16 loop: counter - 1
         i_beq(11, 0, 1),           // 17 exit loop when zero, to 19
         i_j(16),                   // 18 back to the loop
         i_add(13, 6, 9),           // 19
         i_j(22),                   // 20 jump over 21
         i_ori(14, 0, 7),           // 21 skipped
         i_add(15, 13, 13),         // 22
         i_add(0, 1, 1)};           // 23 write to $0: no effect
  endfunction

  // Directed program for the pipelined processor: same coverage without j,
  // with every dependence at least three instructions apart and three NOPs
  // after each beq (they are executed whether or not it is taken).
  function automatic void prog_directed_pl(ref logic [31:0] q[$]);
    q = {i_ori(1, 0, 5),            // 0
         i_ori(2, 0, 5),            // 1
         i_ori(3, 0, 16'hffff),     // 2
         i_ori(8, 0, 16),           // 3
         i_add(4, 1, 2),            // 4  $2 written three slots earlier
         i_sub(5, 1, 3),            // 5
         NOP,                       // 6
         i_sw(4, 8, 0),             // 7
         i_sw(5, -4, 8),            // 8
         i_lw(6, 8, 0),             // 9
         i_lw(9, -4, 8),            // 10
         i_beq(1, 2, 4),            // 11 taken, to 16
         NOP, NOP, NOP,             // 12-14 executed after the beq
         i_ori(10, 0, 1),           // 15 skipped
         i_beq(1, 3, 4),            // 16 not taken
         NOP, NOP, NOP,             // 17-19
         i_add(11, 6, 9),           // 20
         i_ori(12, 0, 2),           // 21 loop counter
         i_ori(13, 0, 1),           // 22
         NOP, NOP,                  // 23-24
         i_sub(12, 12, 13),         // 25 loop: counter - 1
         NOP, NOP,                  // 26-27
         i_beq(12, 0, 7),           // 28 leave the loop when zero, to 36
         NOP, NOP, NOP,             // 29-31
         i_beq(0, 0, -8),           // 32 back to 25
         NOP, NOP, NOP,             // 33-35
         i_add(14, 11, 11),         // 36
         i_add(0, 1, 1)};           // 37 write to $0: no effect
  endfunction

endpackage
