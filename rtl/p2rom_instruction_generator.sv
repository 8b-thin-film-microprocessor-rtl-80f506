// p2rom_instruction_generator: the instruction generator chip.
//
// A 4-bit program counter addresses a 4-to-16 line decoder, which selects
// one line of the print-programmable WORM memory; the 9-bit word on that line
// is captured by the instruction register at the next rising edge. So in
// every cycle the register presents the word of the line the PC pointed at
// one cycle earlier, and the 16 lines are replayed endlessly in order.
// instr[5:0] is the opcode, instr[7:6] the register select, instr[8] a spare
// column. After reset pc = 0 and instr = 0 (NOOP); the first line reaches
// instr after the first rising edge.
// The block structure follows the document; the reset and the assignment of
// the 9 columns are this design's choices.
module p2rom_instruction_generator
  import mp_pkg::*;
#(
  parameter int unsigned ROWS = 16,
  parameter int unsigned IW   = 9,
  parameter logic [ROWS-1:0][IW-1:0] PROGRAM = AVERAGER
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic [IW-1:0]            instr,
  output logic [$clog2(ROWS)-1:0]  pc
);
  localparam int unsigned N = $clog2(ROWS);

  logic [ROWS-1:0] sel;
  logic [IW-1:0]   word;

  program_counter #(.N(N)) u_pc (
    .clk  (clk),
    .rst_n(rst_n),
    .pc   (pc)
  );

  line_decoder #(.N(N)) u_dec (
    .addr(pc),
    .sel (sel)
  );

  worm_memory #(.ROWS(ROWS), .IW(IW), .PROGRAM(PROGRAM)) u_rom (
    .sel (sel),
    .data(word)
  );

  instruction_register #(.IW(IW)) u_ir (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (word),
    .q    (instr)
  );
endmodule
