// alu: the processor core's W-bit arithmetic and logic unit.
//
// A is always the accumulator; B is a C-register or the input bus. Functions
// (mp_pkg::alu_fn_e): PASS_B (load B), AND, OR, NOT A, ADD A+B, SUB A-B,
// LSR A (shift right, 0 in), LSL A (shift left, 0 in). ADD and SUB share one
// ripple_carry_adder: SUB adds the inverted B with a carry in of 1. INC and
// DEC are ADD and SUB with B = 1 (the hard-wired C-register). Purely
// combinational; cout is the adder's carry out, which the core does not store.
// The function list follows the document; the encoding, the zero-fill of the
// shifts and the way SUB uses the adder are this design's choices.
module alu
  import mp_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  alu_fn_e      fn,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output logic         cout
);
  logic         sub;
  logic [W-1:0] b_add;
  logic [W-1:0] sum;

  assign sub   = (fn == FN_SUB);
  assign b_add = sub ? ~b : b;

  ripple_carry_adder #(.W(W)) u_adder (
    .a   (a),
    .b   (b_add),
    .cin (sub),
    .sum (sum),
    .cout(cout)
  );

  always_comb begin
    unique case (fn)
      FN_PASS_B: y = b;
      FN_AND:    y = a & b;
      FN_OR:     y = a | b;
      FN_NOT:    y = ~a;
      FN_ADD,
      FN_SUB:    y = sum;
      FN_LSR:    y = {1'b0, a[W-1:1]};
      FN_LSL:    y = {a[W-2:0], 1'b0};
      default:   y = b;
    endcase
  end
endmodule
