// regfile_tb: checks the register file in both of its modes against an
// array kept by the testbench: clocked writes, combinational reads on both
// ports, register 0 reading zero, reset, and, for the write-first instance,
// that a read of the register being written returns the new value in the
// same cycle while the plain instance returns the old value.
module regfile_tb;
  logic        clk = 0, rst;
  logic        we;
  logic [4:0]  rw, ra, rb;
  logic [31:0] w, a0, b0, a1, b1;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile #(.WRITE_FIRST(1'b0)) dut0 (.clk(clk), .rst(rst), .reg_wr(we), .rw(rw), .bus_w(w),
                                      .ra(ra), .rb(rb), .bus_a(a0), .bus_b(b0));
  regfile #(.WRITE_FIRST(1'b1)) dut1 (.clk(clk), .rst(rst), .reg_wr(we), .rw(rw), .bus_w(w),
                                      .ra(ra), .rb(rb), .bus_a(a1), .bus_b(b1));

  always #5 clk = ~clk;

  function automatic logic [31:0] old_val(logic [4:0] r);
    return (r == 0) ? 32'h0 : model[r];
  endfunction
  function automatic logic [31:0] new_val(logic [4:0] r);
    return (r == 0) ? 32'h0 : (we && rw == r) ? w : model[r];
  endfunction

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s ra=%0d rb=%0d rw=%0d got %h exp %h", what, ra, rb, rw, got, exp);
    end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    rst = 1; we = 0; rw = 0; ra = 0; rb = 0; w = 0;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    for (int r = 0; r < 32; r++) begin      // reset clears everything
      ra = 5'(r); rb = 5'(31 - r); #1;
      expect_eq(a0, 0, "reset a"); expect_eq(b0, 0, "reset b");
    end
    for (int i = 0; i < 2000; i++) begin
      we = ($urandom_range(3) != 0);
      rw = 5'($urandom);
      w  = $urandom;
      ra = (i % 3 == 0) ? rw : 5'($urandom);
      rb = (i % 5 == 0) ? rw : 5'($urandom);
      #1;
      expect_eq(a0, old_val(ra), "plain a");
      expect_eq(b0, old_val(rb), "plain b");
      expect_eq(a1, new_val(ra), "write-first a");
      expect_eq(b1, new_val(rb), "write-first b");
      @(posedge clk);
      if (we && rw != 0) model[rw] = w;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
