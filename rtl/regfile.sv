// regfile: 32 x 32-bit register file with two read ports (Ra/busA, Rb/busB)
// and one write port (Rw/busW, RegWr).
//
// Reads are combinational; the write happens at the rising clock edge when
// RegWr is high. Register 0 always reads as zero and ignores writes (MIPS
// convention, not stated in the lecture). Reset clears every register, a
// choice of this design.
//
// WRITE_FIRST selects the pipelined-datapath behaviour "left half is write,
// right half is read": a register written in a cycle is seen by a read of
// the same register in that cycle (busW is passed straight to the read port).
// The single-cycle processor must leave it 0, because there busW depends on
// busA through the ALU and the bypass would close a combinational loop.
module regfile #(
  parameter int unsigned NREGS       = 32,
  parameter int unsigned WIDTH       = 32,
  parameter bit          WRITE_FIRST = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     reg_wr,
  input  logic [$clog2(NREGS)-1:0] rw,
  input  logic [WIDTH-1:0]         bus_w,
  input  logic [$clog2(NREGS)-1:0] ra,
  input  logic [$clog2(NREGS)-1:0] rb,
  output logic [WIDTH-1:0]         bus_a,
  output logic [WIDTH-1:0]         bus_b
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (reg_wr && rw != '0) begin
      regs[rw] <= bus_w;
    end
  end

  function automatic logic [WIDTH-1:0] rd_port(input logic [$clog2(NREGS)-1:0] r);
    if (r == '0)                                  return '0;
    else if (WRITE_FIRST && reg_wr && rw == r)    return bus_w;
    else                                          return regs[r];
  endfunction

  assign bus_a = rd_port(ra);
  assign bus_b = rd_port(rb);

endmodule
