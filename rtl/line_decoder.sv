// line_decoder: N-to-2**N one-hot decoder that drives the select lines
// (rows) of the printable WORM memory, one line at a time.
// Purely combinational: sel[addr] is 1, every other bit 0.
// The 4-to-16 size follows the document.
module line_decoder #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]    addr,
  output logic [2**N-1:0] sel
);
  always_comb begin
    sel       = '0;
    sel[addr] = 1'b1;
  end
endmodule
