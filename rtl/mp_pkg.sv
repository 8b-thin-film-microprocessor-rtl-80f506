// mp_pkg: types and constants shared by the processor core and the P2ROM
// instruction generator.
//
// The core is steered by a 9-bit instruction word read from a 16-line
// print-programmable ROM: 6 opcode bits, 2 register-select bits and one spare
// column. The widths (8-bit data, 4-bit program counter, 16 lines, 9-bit word,
// 6 + 2 control bits) follow the document. The bit-level encoding of the
// opcode is this design's own choice, since none is published:
//
//   opcode[5:3]  ALU function  (PASS_B, AND, OR, NOT, ADD, SUB, LSR, LSL)
//   opcode[2]    B operand     (0: C-register chosen by regsel, 1: input bus)
//   opcode[1:0]  destination   (none, accumulator, C-register, output register)
//
// The all-zero word is a NOOP, so a ROM line with nothing printed on it does
// nothing. INC and DEC are ADD and SUB with regsel = 3, the hard-wired 1.
package mp_pkg;

  localparam int unsigned ROM_ROWS = 16;  // ROM lines (4-bit program counter)
  localparam int unsigned WORD_W   = 9;   // instruction word: 6 opcode + 2 select + 1 spare

  typedef enum logic [2:0] {
    FN_PASS_B = 3'b000,
    FN_AND    = 3'b001,
    FN_OR     = 3'b010,
    FN_NOT    = 3'b011,
    FN_ADD    = 3'b100,
    FN_SUB    = 3'b101,
    FN_LSR    = 3'b110,
    FN_LSL    = 3'b111
  } alu_fn_e;

  typedef enum logic [1:0] {
    DST_NONE = 2'b00,
    DST_ACC  = 2'b01,
    DST_CREG = 2'b10,
    DST_OUT  = 2'b11
  } dest_e;

  typedef enum logic [1:0] {
    SEL_C1  = 2'd0,
    SEL_C2  = 2'd1,
    SEL_C3  = 2'd2,
    SEL_ONE = 2'd3   // hard-wired 1
  } regsel_e;

  typedef struct packed {
    alu_fn_e fn;
    logic    b_from_in;
    dest_e   dest;
  } opcode_t;

  typedef struct packed {
    logic    spare;
    regsel_e regsel;
    opcode_t op;
  } instr_t;

  // Control signals produced by the core decoder.
  typedef struct packed {
    alu_fn_e fn;
    logic    b_from_in;
    logic    acc_we;
    logic    creg_we;
    logic    out_we;
  } ctrl_t;

  // Builds one instruction word.
  function automatic logic [WORD_W-1:0] mk(alu_fn_e fn, logic b_from_in, dest_e dest,
                                       regsel_e sel);
    instr_t i;
    i.spare        = 1'b0;
    i.regsel       = sel;
    i.op.fn        = fn;
    i.op.b_from_in = b_from_in;
    i.op.dest      = dest;
    return i;
  endfunction

  localparam logic [WORD_W-1:0] I_NOOP = '0;

  // Running averager, executed twice per output value:
  //   pass 1:  x   <- round((in + x) / 2)      (ADD, INC, LSR)
  //   pass 2:  out <- in + x ;  x <- (in + x) >> 1
  // The output keeps the bit that the final LSR drops, so a 6-bit input gives
  // a 7-bit output. Lines 10..15 are left unprinted (NOOP).
  typedef logic [ROM_ROWS-1:0][WORD_W-1:0] program_t;

  localparam program_t AVERAGER = '{
    15: I_NOOP, 14: I_NOOP, 13: I_NOOP, 12: I_NOOP, 11: I_NOOP, 10: I_NOOP,
    0: mk(FN_PASS_B, 1'b1, DST_ACC,  SEL_C1),   // ACC <- IN
    1: mk(FN_ADD,    1'b0, DST_ACC,  SEL_C1),   // ACC <- ACC + C1
    2: mk(FN_ADD,    1'b0, DST_ACC,  SEL_ONE),  // INC
    3: mk(FN_LSR,    1'b0, DST_ACC,  SEL_C1),   // LSR
    4: mk(FN_PASS_B, 1'b0, DST_CREG, SEL_C1),   // C1 <- ACC
    5: mk(FN_PASS_B, 1'b1, DST_ACC,  SEL_C1),   // ACC <- IN
    6: mk(FN_ADD,    1'b0, DST_ACC,  SEL_C1),   // ACC <- ACC + C1
    7: mk(FN_PASS_B, 1'b0, DST_OUT,  SEL_C1),   // OUT <- ACC
    8: mk(FN_LSR,    1'b0, DST_ACC,  SEL_C1),   // LSR
    9: mk(FN_PASS_B, 1'b0, DST_CREG, SEL_C1)    // C1 <- ACC
  };

endpackage
