// single_cycle_cpu_tb: runs programs on the single-cycle processor and
// checks every cycle against the instruction-set reference model
// (sc_checker): a directed program covering all seven instructions, branches
// both ways, a loop and a jump; the lecture's array-element swap; the three
// independent loads; and random programs. It also checks that the directed
// program reaches its halt loop after exactly 26 cycles, one per instruction
// executed (counted by hand from the program).
module single_cycle_cpu_tb;
  import mips_tb_pkg::*;
  logic        clk = 0, rst = 1, run = 0;
  logic        ld_en = 0;
  logic [7:0]  ld_addr = 0;
  logic [31:0] ld_data = 0;
  logic [31:0] pc, instr, reg_wdata, mem_addr, mem_wdata;
  logic [4:0]  reg_waddr;
  logic        reg_we, mem_we;
  image_t      img;
  logic [31:0] prog[$];
  int checks = 0, failures = 0;

  single_cycle_cpu dut (
    .clk(clk), .rst(rst), .imem_load_en(ld_en), .imem_load_addr(ld_addr), .imem_load_data(ld_data),
    .pc(pc), .instr(instr), .reg_we(reg_we), .reg_waddr(reg_waddr), .reg_wdata(reg_wdata),
    .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata));

  sc_checker chk (
    .clk(clk), .run(run), .pc(pc), .instr(instr), .reg_we(reg_we), .reg_waddr(reg_waddr),
    .reg_wdata(reg_wdata), .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata));

  always #5 clk = ~clk;

  // Load the image while in reset, then run for n cycles. Returns the cycle
  // in which the halt loop is first fetched (-1 if never).
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
    for (int c = 0; c < n; c++) begin
      if (halt_cycle < 0 && pc == 32'(halt_word * 4)) halt_cycle = c;
      @(posedge clk); #1;
    end
    run = 0;
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures); $finish;
  end

  initial begin
    int hc;
    prog_directed_sc(prog);
    run_prog(60, hc);
    checks++;
    if (hc != 26) begin failures++; $display("FAIL directed program reached halt in cycle %0d, expected 26", hc); end
    prog_swap(prog);
    run_prog(20, hc);
    prog_three_lw(prog);
    run_prog(15, hc);
    for (int r = 0; r < 4; r++) begin
      prog.delete();
      random_program(prog, 200, 0, 8);
      run_prog(210, hc);
    end
    checks++;
    if (chk.taken == 0 || chk.not_taken == 0 || chk.kinds[7] == 0) begin
      failures++; $display("FAIL coverage taken=%0d not_taken=%0d jumps=%0d", chk.taken, chk.not_taken, chk.kinds[7]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures);
    $finish;
  end
endmodule
