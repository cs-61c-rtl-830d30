// pipe_reg_tb: checks that a pipeline register holds the value captured at
// the last rising edge for a whole cycle, and loads its reset value on reset.
module pipe_reg_tb;
  import cpu_pkg::*;
  logic    clk = 0, rst;
  ex_mem_t d, q, held;
  int checks = 0, failures = 0;

  pipe_reg #(.T(ex_mem_t)) dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic expect_eq(ex_mem_t got, ex_mem_t exp, string what);
    checks++;
    if (got !== exp) begin failures++; if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; d = {$urandom, $urandom, $urandom, $urandom};
    @(posedge clk); #1;
    expect_eq(q, '0, "reset");
    rst = 0;
    for (int i = 0; i < 500; i++) begin
      d = {$urandom, $urandom, $urandom, $urandom};
      held = d;
      @(posedge clk); #1;
      expect_eq(q, held, "capture");
      d = ~held;                     // changing d mid-cycle must not show on q
      #3;
      expect_eq(q, held, "hold");
      if (i % 100 == 99) begin
        rst = 1; @(posedge clk); #1; expect_eq(q, '0, "reset mid-run"); rst = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
