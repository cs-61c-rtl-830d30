// cs61c_top_tb: end-to-end test of the whole design at its default sizes.
//
// Both processors run the same workloads at the same time: the single-cycle
// one runs each program as written, the pipelined one the same program with
// NOPs where a dependence is closer than three instructions (for the
// directed programs, a version written for the pipeline). Each is checked
// cycle by cycle against the reference model (sc_checker, pl_checker), and
// for branch-free programs the sequence of register and memory writes of the
// two processors must be identical. Workloads: the array-element swap, the
// three independent loads, the directed programs and random programs.
// Timing: the single-cycle processor completes one instruction per cycle
// (an n-instruction straight-line program reaches its halt loop in cycle n);
// the pipelined one fills in four cycles and then completes one per cycle
// (its last write lands in cycle n+3 for n fetched instructions).
// Every mechanism is counted and must occur at least once: each of the seven
// instruction kinds, taken and untaken beq and j on the single-cycle
// processor; on the pipeline lw, sw, add, sub, ori, taken and untaken beq,
// cycles with all five stages busy, and a register written and read in the
// same cycle.
module cs61c_top_tb;
  import mips_tb_pkg::*;
  logic        clk = 0, rst = 1, run = 0;
  logic        sc_ld_en = 0, pl_ld_en = 0;
  logic [7:0]  ld_addr = 0;
  logic [31:0] sc_ld_data = 0, pl_ld_data = 0;
  logic [31:0] sc_pc, sc_instr, sc_reg_wdata, sc_mem_addr, sc_mem_wdata;
  logic [31:0] pl_pc, pl_instr, pl_reg_wdata, pl_mem_addr, pl_mem_wdata;
  logic [4:0]  sc_reg_waddr, pl_reg_waddr;
  logic        sc_reg_we, sc_mem_we, pl_reg_we, pl_mem_we, pl_branch_taken;
  image_t      sc_img, pl_img;
  logic [31:0] sc_prog[$], pl_prog[$];
  logic [69:0] sc_log[$], pl_log[$];
  int checks = 0, failures = 0;
  int sc_halt, pl_halt, pl_last_write;

  cs61c_top dut (
    .clk(clk), .rst(rst),
    .sc_imem_load_en(sc_ld_en), .sc_imem_load_addr(ld_addr), .sc_imem_load_data(sc_ld_data),
    .sc_pc(sc_pc), .sc_instr(sc_instr), .sc_reg_we(sc_reg_we), .sc_reg_waddr(sc_reg_waddr),
    .sc_reg_wdata(sc_reg_wdata), .sc_mem_we(sc_mem_we), .sc_mem_addr(sc_mem_addr),
    .sc_mem_wdata(sc_mem_wdata),
    .pl_imem_load_en(pl_ld_en), .pl_imem_load_addr(ld_addr), .pl_imem_load_data(pl_ld_data),
    .pl_pc(pl_pc), .pl_instr(pl_instr), .pl_branch_taken(pl_branch_taken), .pl_reg_we(pl_reg_we),
    .pl_reg_waddr(pl_reg_waddr), .pl_reg_wdata(pl_reg_wdata), .pl_mem_we(pl_mem_we),
    .pl_mem_addr(pl_mem_addr), .pl_mem_wdata(pl_mem_wdata));

  sc_checker sc_chk (
    .clk(clk), .run(run), .pc(sc_pc), .instr(sc_instr), .reg_we(sc_reg_we), .reg_waddr(sc_reg_waddr),
    .reg_wdata(sc_reg_wdata), .mem_we(sc_mem_we), .mem_addr(sc_mem_addr), .mem_wdata(sc_mem_wdata));

  pl_checker pl_chk (
    .clk(clk), .run(run), .pc(pl_pc), .instr(pl_instr), .branch_taken(pl_branch_taken),
    .reg_we(pl_reg_we), .reg_waddr(pl_reg_waddr), .reg_wdata(pl_reg_wdata), .mem_we(pl_mem_we),
    .mem_addr(pl_mem_addr), .mem_wdata(pl_mem_wdata), .rf_wr(dut.u_pl.u_rf.reg_wr),
    .rf_rw(dut.u_pl.u_rf.rw), .rf_ra(dut.u_pl.u_rf.ra), .rf_rb(dut.u_pl.u_rf.rb));

  always #5 clk = ~clk;

  task automatic expect_int(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // Load both images while in reset, then run both processors for n cycles,
  // logging their architectural writes in order.
  task automatic run_both(int n);
    to_image(sc_prog, sc_img);
    to_image(pl_prog, pl_img);
    rst = 1; run = 0;
    for (int i = 0; i < IMG_WORDS; i++) begin
      sc_ld_en = 1; pl_ld_en = 1; ld_addr = 8'(i); sc_ld_data = sc_img[i]; pl_ld_data = pl_img[i];
      @(posedge clk); #1;
    end
    sc_ld_en = 0; pl_ld_en = 0;
    @(posedge clk); #1;
    sc_chk.start(sc_img);
    pl_chk.start(pl_img);
    rst = 0; run = 1;
    sc_log.delete(); pl_log.delete();
    sc_halt = -1; pl_halt = -1; pl_last_write = -1;
    for (int c = 0; c < n; c++) begin
      @(negedge clk);
      if (sc_halt < 0 && sc_pc == 32'(sc_prog.size() * 4)) sc_halt = c;
      if (pl_halt < 0 && pl_pc == 32'(pl_prog.size() * 4)) pl_halt = c;
      if (sc_reg_we && sc_reg_waddr != 0) sc_log.push_back({1'b0, 32'(sc_reg_waddr), sc_reg_wdata, 5'd0});
      if (sc_mem_we)                      sc_log.push_back({1'b1, sc_mem_addr, sc_mem_wdata, 5'd0});
      if (pl_reg_we && pl_reg_waddr != 0) begin
        pl_log.push_back({1'b0, 32'(pl_reg_waddr), pl_reg_wdata, 5'd0});
        pl_last_write = c;
      end
      if (pl_mem_we) begin
        pl_log.push_back({1'b1, pl_mem_addr, pl_mem_wdata, 5'd0});
        pl_last_write = c + 1;    // a store is in MEM one cycle before WB
      end
    end
    @(posedge clk); #1;
    run = 0;
  endtask

  task automatic compare_logs(string name);
    checks++;
    if (sc_log != pl_log) begin
      failures++;
      $display("FAIL %s: the two processors made different writes (%0d vs %0d)", name, sc_log.size(), pl_log.size());
    end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + sc_chk.checks + pl_chk.checks,
             failures + sc_chk.failures + pl_chk.failures);
    $finish;
  end

  initial begin
    // The lecture's swap of v[k] and v[k+1]
    prog_swap(sc_prog);
    pl_prog = sc_prog;
    pad_hazards(pl_prog);
    run_both(40);
    compare_logs("swap");
    expect_int(sc_halt, sc_prog.size(), "single-cycle swap: one instruction per cycle");
    expect_int(pl_last_write, pl_prog.size() + 3, "pipelined swap: last write after fill + one per cycle");
    checks++;
    if (sc_log.size() < 2 || sc_log[sc_log.size()-2][68:5] != {32'd10, 32'h5555} ||
        sc_log[sc_log.size()-1][68:5] != {32'd11, 32'hAAAA}) begin
      failures++; $display("FAIL swap: v[k] and v[k+1] were not exchanged");
    end

    // Three independent loads
    prog_three_lw(sc_prog);
    pl_prog = sc_prog;
    pad_hazards(pl_prog);
    expect_int(pl_prog.size(), sc_prog.size(), "three loads need no padding");
    run_both(25);
    compare_logs("three loads");
    expect_int(sc_halt, 9, "single-cycle: nine instructions in nine cycles");
    expect_int(pl_last_write, 9 + 3, "pipelined: nine instructions written back by cycle 12");

    // Directed programs (different code for the two processors)
    prog_directed_sc(sc_prog);
    prog_directed_pl(pl_prog);
    run_both(60);
    expect_int(sc_halt, 26, "single-cycle directed halt cycle");
    expect_int(pl_halt, 44, "pipelined directed halt cycle");

    // Random straight-line programs, sharing the dependence-spaced code
    for (int r = 0; r < 5; r++) begin
      sc_prog.delete();
      random_program(sc_prog, 120, 3, 8);
      pl_prog = sc_prog;
      run_both(sc_prog.size() + 10);
      compare_logs("random program");
    end

    // Every mechanism must have happened
    expect_int(int'(sc_chk.kinds[1] > 0), 1, "single-cycle add executed");
    expect_int(int'(sc_chk.kinds[2] > 0), 1, "single-cycle sub executed");
    expect_int(int'(sc_chk.kinds[3] > 0), 1, "single-cycle ori executed");
    expect_int(int'(sc_chk.kinds[4] > 0), 1, "single-cycle lw executed");
    expect_int(int'(sc_chk.kinds[5] > 0), 1, "single-cycle sw executed");
    expect_int(int'(sc_chk.taken > 0), 1, "single-cycle beq taken");
    expect_int(int'(sc_chk.not_taken > 0), 1, "single-cycle beq not taken");
    expect_int(int'(sc_chk.kinds[7] > 0), 1, "single-cycle j executed");
    expect_int(int'(pl_chk.kinds[1] > 0 && pl_chk.kinds[2] > 0 && pl_chk.kinds[3] > 0), 1,
               "pipelined add, sub and ori executed");
    expect_int(int'(pl_chk.kinds[4] > 0 && pl_chk.kinds[5] > 0), 1, "pipelined lw and sw executed");
    expect_int(int'(pl_chk.taken > 0), 1, "pipelined beq taken");
    expect_int(int'(pl_chk.not_taken > 0), 1, "pipelined beq not taken");
    expect_int(int'(pl_chk.full_cycles > 0), 1, "pipeline full");
    expect_int(int'(pl_chk.same_cycle_rw > 0), 1, "register written and read in one cycle");
    $display("mechanisms: single-cycle add=%0d sub=%0d ori=%0d lw=%0d sw=%0d beq taken=%0d untaken=%0d j=%0d",
             sc_chk.kinds[1], sc_chk.kinds[2], sc_chk.kinds[3], sc_chk.kinds[4], sc_chk.kinds[5],
             sc_chk.taken, sc_chk.not_taken, sc_chk.kinds[7]);
    $display("mechanisms: pipelined add=%0d sub=%0d ori=%0d lw=%0d sw=%0d beq taken=%0d untaken=%0d full=%0d same-cycle write/read=%0d",
             pl_chk.kinds[1], pl_chk.kinds[2], pl_chk.kinds[3], pl_chk.kinds[4], pl_chk.kinds[5],
             pl_chk.taken, pl_chk.not_taken, pl_chk.full_cycles, pl_chk.same_cycle_rw);
    $display("TB_RESULT checks=%0d failures=%0d", checks + sc_chk.checks + pl_chk.checks,
             failures + sc_chk.failures + pl_chk.failures);
    $finish;
  end
endmodule
