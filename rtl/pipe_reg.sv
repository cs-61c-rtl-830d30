// pipe_reg: a pipeline register, the storage placed between two stages to
// hold what the earlier stage produced in the previous cycle.
//
// On every rising clock edge d is captured and appears on q for the whole
// next cycle. Synchronous reset loads RESET_VALUE; the processors use
// all-zero, which is a bubble (no register or memory write, no branch).
// The payload type T is a packed struct chosen by the instantiating stage.
// The lecture's registers have no enable or flush input, so neither has this.
module pipe_reg #(
  parameter type T           = logic [31:0],
  parameter T    RESET_VALUE = '0
) (
  input  logic clk,
  input  logic rst,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk) begin
    if (rst) q <= RESET_VALUE;
    else     q <= d;
  end

endmodule
