// ripple_carry_adder: W-bit adder made of a chain of mirror_adder cells.
//
// Bit i's carry feeds bit i+1. The mirror adder returns inverted outputs,
// so the carry alternates polarity along the chain instead of passing
// through an inverter at every bit:
//   even bit: operands a, b and a true carry in  -> inverted carry out;
//             the sum bit is the inverted cell output.
//   odd bit:  operands ~a, ~b and the inverted carry -> true carry out
//             (self-duality of the full adder); the cell's output is the
//             true sum bit.
// Only the operand bits of odd stages are inverted, off the carry path.
// Purely combinational; the carry ripples through W cells.
// The ripple-carry structure of mirror adders follows the document; the
// alternating-polarity arrangement is the standard way of chaining mirror
// adders and is this design's reading.
module ripple_carry_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  // c[i] is the carry into bit i: true polarity for even i, inverted for odd i
  logic [W:0]   c;
  logic [W-1:0] s_cell;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    if (i % 2 == 0) begin : g_even
      mirror_adder u_fa (
        .a   (a[i]),
        .b   (b[i]),
        .ci  (c[i]),
        .s_n (s_cell[i]),
        .co_n(c[i+1])
      );
      assign sum[i] = ~s_cell[i];
    end else begin : g_odd
      mirror_adder u_fa (
        .a   (~a[i]),
        .b   (~b[i]),
        .ci  (c[i]),
        .s_n (s_cell[i]),
        .co_n(c[i+1])
      );
      assign sum[i] = s_cell[i];
    end
  end

  // the carry out of bit W-1 is true when W is even, inverted when W is odd
  assign cout = (W % 2 == 0) ? c[W] : ~c[W];
endmodule
