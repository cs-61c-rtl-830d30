// data_memory_tb: checks the data memory against an array kept by the
// testbench: reset clears it, writes take effect at the clock edge only when
// WrEn is high, reads are combinational and address whole words.
module data_memory_tb;
  localparam int AW = 8;
  logic        clk = 0, rst, we;
  logic [31:0] adr, din, dout;
  logic [31:0] model [2**AW];
  int checks = 0, failures = 0;

  data_memory #(.AW(AW)) dut (.clk(clk), .rst(rst), .wr_en(we), .adr(adr), .data_in(din), .data_out(dout));

  always #5 clk = ~clk;

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s adr=%h got %h exp %h", what, adr, got, exp);
    end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    rst = 1; we = 0; adr = 0; din = 0;
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 2**AW; i++) begin adr = 32'(i * 4); #1; expect_eq(dout, 0, "after reset"); end
    for (int i = 0; i < 3000; i++) begin
      we  = $urandom_range(1);
      adr = {22'($urandom), 8'($urandom_range(2**AW - 1)), 2'b00};
      din = $urandom;
      #1;
      expect_eq(dout, model[adr[AW+1:2]], "read before edge");   // write not yet visible
      @(posedge clk);
      if (we) model[adr[AW+1:2]] = din;
      #1;
      expect_eq(dout, model[adr[AW+1:2]], "read after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
