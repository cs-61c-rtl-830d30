// data_memory: word-addressed data memory of both processors.
//
// Adr is a byte address; bits [AW+1:2] select one of 2**AW 32-bit words
// (word-aligned accesses only, lw/sw move whole words). The read is
// combinational, as the single-cycle datapath needs the data within the same
// cycle; Data In is written at the rising clock edge when WrEn is high. The
// lecture gives neither the size nor the timing of the read, so 256 words and
// the asynchronous read are this design's choices. Contents are cleared by
// reset.
module data_memory #(
  parameter int unsigned AW = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        wr_en,
  input  logic [31:0] adr,
  input  logic [31:0] data_in,
  output logic [31:0] data_out
);

  logic [31:0] mem [2**AW];
  logic [AW-1:0] widx;

  assign widx = adr[AW+1:2];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 2**AW; i++) mem[i] <= '0;
    end else if (wr_en) begin
      mem[widx] <= data_in;
    end
  end

  assign data_out = mem[widx];

endmodule
