// data_register: W-bit register with write enable, used for the accumulator
// and for the output register of the processor core.
//
// q takes d at the rising clock edge when en is high and holds otherwise.
// An asynchronous active-low reset clears it; the reset is this design's
// addition, the document does not describe one.
module data_register #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end
endmodule
