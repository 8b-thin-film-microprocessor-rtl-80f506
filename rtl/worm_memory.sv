// worm_memory: print-programmable write-once-read-many ROM, ROWS lines of IW
// bits.
//
// Each column is a NOR gate whose inputs are the select transistors that
// were printed on that column; a printed connection on the selected line
// pulls the column and, after the column's output inverter, reads as 1, an
// unprinted one reads as 0. The logic of column c is therefore
//   data[c] = OR over r of (sel[r] & PROGRAM[r][c]).
// PROGRAM is the print pattern: bit [r][c] set means line r has a transistor
// connected to column c. sel is one-hot from line_decoder; an all-zero sel
// reads 0, and an assertion flags two lines selected at once (the NOR
// columns would then read the OR of both lines). Purely combinational.
// Sizes, the NOR organisation and "printed = 1" follow the document; the
// default print pattern is this design's encoding of the running averager.
// The printable extra load transistors only set analog levels and have no
// counterpart here.
module worm_memory
  import mp_pkg::*;
#(
  parameter int unsigned ROWS = 16,
  parameter int unsigned IW   = 9,
  parameter logic [ROWS-1:0][IW-1:0] PROGRAM = AVERAGER
) (
  input  logic [ROWS-1:0] sel,
  output logic [IW-1:0]   data
);
  always_comb begin
    data = '0;
    for (int r = 0; r < int'(ROWS); r++) begin
      data |= PROGRAM[r] & {IW{sel[r]}};
    end
  end

  always_comb begin
    a_one_line: assert ($onehot0(sel))
      else $error("worm_memory: more than one line selected (%b)", sel);
  end
endmodule
