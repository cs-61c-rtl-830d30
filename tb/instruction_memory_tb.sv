// instruction_memory_tb: loads every word through the load port and reads
// each back by byte address (PC), checking the combinational read and that
// the two low address bits are ignored.
module instruction_memory_tb;
  localparam int AW = 8;
  logic          clk = 0, load_en;
  logic [AW-1:0] load_addr;
  logic [31:0]   load_data, addr, instr;
  logic [31:0]   model [2**AW];
  int checks = 0, failures = 0;

  instruction_memory #(.AW(AW)) dut (.clk(clk), .load_en(load_en), .load_addr(load_addr),
                                     .load_data(load_data), .addr(addr), .instr(instr));

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load_en = 0; load_addr = 0; load_data = 0; addr = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 2**AW; i++) begin
        model[i] = $urandom;
        load_en = 1; load_addr = AW'(i); load_data = model[i];
        @(posedge clk); #1;
      end
      load_en = 0;
      load_data = $urandom;            // ignored while load_en is low
      @(posedge clk); #1;
      for (int i = 0; i < 2**AW; i++) begin
        addr = {22'($urandom), AW'(i), 2'($urandom)};
        #1;
        checks++;
        if (instr !== model[i]) begin
          failures++;
          if (failures < 10) $display("FAIL addr=%h got %h exp %h", addr, instr, model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
