// core_decoder: turns the 6 opcode bits of the processor core into control
// signals.
//
// The opcode fields (mp_pkg::opcode_t) are ALU function, B-operand source and
// destination. The destination becomes one of three write enables:
// accumulator (takes the ALU result), C-register or output register (both
// take the accumulator). Destination "none" is a NOOP whatever the other
// bits say. Purely combinational. The 6-bit opcode width follows the
// document; the field layout is this design's own.
module core_decoder
  import mp_pkg::*;
(
  input  opcode_t opcode,
  output ctrl_t   ctrl
);
  always_comb begin
    ctrl.fn        = opcode.fn;
    ctrl.b_from_in = opcode.b_from_in;
    ctrl.acc_we    = (opcode.dest == DST_ACC);
    ctrl.creg_we   = (opcode.dest == DST_CREG);
    ctrl.out_we    = (opcode.dest == DST_OUT);
  end
endmodule
