// instruction_register: IW-bit register that takes the word read from the
// WORM memory at every rising clock edge and holds it, as the instruction,
// for the processor core during the next cycle. Asynchronous active-low
// reset to 0, which is a NOOP; the reset is this design's addition.
// The 9-bit width and the update every cycle follow the document.
module instruction_register #(
  parameter int unsigned IW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [IW-1:0] d,
  output logic [IW-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end
endmodule
