// mirror_adder: one-bit full adder in the mirror-adder form, the cell that
// shortens the critical path of the core's ripple-carry adder.
//
// Like the transistor-level mirror adder, the cell delivers its results
// inverted: it first forms the inverted carry and reuses it for the inverted
// sum,
//   co_n = ~(a&b | ci&(a|b)),   s_n = ~(a&b&ci | co_n&(a|b|ci)),
// with no output inverters. Because a full adder is self-dual
// (inverting all three inputs inverts both outputs), the adder that uses
// this cell can feed every other stage with inverted operands and the
// inverted carry, and so needs no inverter in the carry chain.
// Purely combinational.
// The cell and its place in the adder follow the document; writing its two
// complex gates as expressions instead of transistors is this design's.
module mirror_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s_n,
  output logic co_n
);
  always_comb begin
    co_n = ~((a & b) | (ci & (a | b)));
    s_n  = ~((a & b & ci) | (co_n & (a | b | ci)));
  end
endmodule
