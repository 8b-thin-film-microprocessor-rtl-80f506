// program_counter: N-bit program counter of the P2ROM instruction generator.
//
// Counts up by one at every rising clock edge and wraps from 2**N-1 to 0, so
// the ROM lines are read in order, over and over. There are no jumps.
// Asynchronous active-low reset to line 0. The 4-bit width follows the
// document; free-running counting and the reset are this design's reading.
module program_counter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [N-1:0] pc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pc <= '0;
    else        pc <= pc + 1'b1;
  end
endmodule
