// next_pc_tb: checks the single-cycle next-PC unit: reset to 0, PC+4 when
// not branching, PC+4+(sign_ext(imm16)<<2) when nPC_sel and Equal are both
// high (including backward branches), PC+4 when only one of them is, and the
// J-type target {PC+4[31:28], target, 00}. The expected PC is tracked here.
module next_pc_tb;
  logic        clk = 0, rst, npc_sel, equal, jump;
  logic [15:0] imm16;
  logic [25:0] target;
  logic [31:0] pc, exp_pc;
  int checks = 0, failures = 0, taken = 0, jumps = 0;

  next_pc dut (.clk(clk), .rst(rst), .npc_sel(npc_sel), .equal(equal), .jump(jump),
               .imm16(imm16), .target(target), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; npc_sel = 0; equal = 0; jump = 0; imm16 = 0; target = 0;
    @(posedge clk); #1;
    rst = 0; exp_pc = 0;
    checks++; if (pc !== 0) begin failures++; $display("FAIL reset pc=%h", pc); end
    for (int i = 0; i < 3000; i++) begin
      npc_sel = $urandom_range(1);
      equal   = $urandom_range(1);
      jump    = ($urandom_range(9) == 0);
      imm16   = 16'($urandom);
      target  = 26'($urandom);
      @(posedge clk); #1;
      if (jump) begin
        exp_pc = {exp_pc[31:28] + 4'(((exp_pc + 4) >> 28) != (exp_pc >> 28)), target, 2'b00};
        jumps++;
      end else if (npc_sel && equal) begin
        exp_pc = exp_pc + 4 + 32'(signed'(imm16)) * 4;
        taken++;
      end else exp_pc = exp_pc + 4;
      checks++;
      if (pc !== exp_pc) begin failures++; if (failures < 10) $display("FAIL i=%0d pc=%h exp %h", i, pc, exp_pc); end
    end
    checks++; if (taken == 0 || jumps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
