// pipelined_cpu_tb: runs programs on the five-stage pipelined processor and
// checks every cycle with pl_checker: fetch PCs, memory writes in MEM, branch
// decisions, register writes in WB. Programs: a directed one (branches both
// ways, a loop, a dependence exactly three slots apart that relies on the
// register file's write-before-read), the array-element swap and the three
// independent loads with NOPs inserted where a dependence is closer than
// three slots, and random hazard-free programs. Timing checks: the first
// result is written in the fifth cycle (latency 5), the three loads write on
// three consecutive cycles (one instruction completes per cycle), and the
// directed program reaches its halt loop in cycle 44, which counts the three
// instructions after each beq that enter the pipeline before the branch
// takes effect.
module pipelined_cpu_tb;
  import mips_tb_pkg::*;
  logic        clk = 0, rst = 1, run = 0;
  logic        ld_en = 0;
  logic [7:0]  ld_addr = 0;
  logic [31:0] ld_data = 0;
  logic [31:0] pc, instr, reg_wdata, mem_addr, mem_wdata;
  logic [4:0]  reg_waddr;
  logic        reg_we, mem_we, branch_taken;
  image_t      img;
  logic [31:0] prog[$];
  int checks = 0, failures = 0;
  int load_wb [$];

  pipelined_cpu dut (
    .clk(clk), .rst(rst), .imem_load_en(ld_en), .imem_load_addr(ld_addr), .imem_load_data(ld_data),
    .pc(pc), .instr(instr), .branch_taken(branch_taken), .reg_we(reg_we), .reg_waddr(reg_waddr),
    .reg_wdata(reg_wdata), .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata));

  pl_checker chk (
    .clk(clk), .run(run), .pc(pc), .instr(instr), .branch_taken(branch_taken), .reg_we(reg_we),
    .reg_waddr(reg_waddr), .reg_wdata(reg_wdata), .mem_we(mem_we), .mem_addr(mem_addr),
    .mem_wdata(mem_wdata), .rf_wr(dut.u_rf.reg_wr), .rf_rw(dut.u_rf.rw), .rf_ra(dut.u_rf.ra),
    .rf_rb(dut.u_rf.rb));

  always #5 clk = ~clk;

  task automatic expect_int(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic run_prog(int n, output int halt_cycle);
    int halt_word = prog.size();
    to_image(prog, img);
    rst = 1; run = 0;
    for (int i = 0; i < IMG_WORDS; i++) begin
      ld_en = 1; ld_addr = 8'(i); ld_data = img[i];
      @(posedge clk); #1;
    end
    ld_en = 0;
    @(posedge clk); #1;
    chk.start(img);
    rst = 0; run = 1;
    halt_cycle = -1;
    load_wb.delete();
    for (int c = 0; c < n; c++) begin
      if (halt_cycle < 0 && pc == 32'(halt_word * 4)) halt_cycle = c;
      if (reg_we && reg_waddr inside {5'd1, 5'd2, 5'd3}) load_wb.push_back(c);
      @(posedge clk); #1;
    end
    run = 0;
  endtask

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures); $finish;
  end

  initial begin
    int hc;
    prog_directed_pl(prog);
    run_prog(60, hc);
    expect_int(hc, 44, "directed program halt cycle");
    expect_int(chk.first_write, 4, "cycle of the first register write (fifth cycle)");
    prog_swap(prog);
    pad_hazards(prog);
    run_prog(40, hc);
    prog_three_lw(prog);
    run_prog(20, hc);
    expect_int(load_wb.size(), 3, "loads written back");
    if (load_wb.size() == 3) begin
      expect_int(load_wb[0], 6 + 4, "first load written back four cycles after its fetch");
      expect_int(load_wb[1], load_wb[0] + 1, "second load one cycle later");
      expect_int(load_wb[2], load_wb[1] + 1, "third load one cycle later");
    end
    for (int r = 0; r < 4; r++) begin
      prog.delete();
      random_program(prog, 150, 3, 8);
      run_prog(prog.size() + 10, hc);
    end
    checks++;
    if (chk.taken == 0 || chk.not_taken == 0 || chk.same_cycle_rw == 0) begin
      failures++;
      $display("FAIL coverage taken=%0d not_taken=%0d same-cycle write/read=%0d", chk.taken, chk.not_taken, chk.same_cycle_rw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures);
    $finish;
  end
endmodule
