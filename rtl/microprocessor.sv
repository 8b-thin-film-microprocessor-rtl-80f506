// microprocessor: the complete two-chip 8-bit thin-film microprocessor.
//
// The P2ROM instruction generator replays its 16 printed lines, one per clock
// cycle, through its 9-bit instruction register; the processor core executes
// the word in that register during the same cycle (6 opcode bits, 2 register
// select bits; the ninth bit is brought out as `spare`). With the default
// print pattern the pair runs a running averager: every 16 cycles the output
// register gets in + x, where x is the running average, and x is updated.
//
// Interface: data_in is the core's input bus, data_out its output register,
// out_strobe is high in the cycle whose edge writes data_out. acc, instr and
// pc are brought out for observation. Both chips share clk and the
// asynchronous active-low reset rst_n (this design's choice; the document
// only says that the two chips were connected).
module microprocessor
  import mp_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter int unsigned ROWS = 16,
  parameter int unsigned IW   = 9,
  parameter logic [ROWS-1:0][IW-1:0] PROGRAM = AVERAGER
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [W-1:0]            data_in,
  output logic [W-1:0]            data_out,
  output logic                    out_strobe,
  output logic [W-1:0]            acc,
  output logic [IW-1:0]           instr,
  output logic [$clog2(ROWS)-1:0] pc,
  output logic                    spare
);
  instr_t iw;

  p2rom_instruction_generator #(.ROWS(ROWS), .IW(IW), .PROGRAM(PROGRAM)) u_p2rom (
    .clk  (clk),
    .rst_n(rst_n),
    .instr(instr),
    .pc   (pc)
  );

  assign iw    = instr_t'(instr[8:0]);
  assign spare = iw.spare;

  processor_core #(.W(W)) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .opcode    (iw.op),
    .regsel    (iw.regsel),
    .data_in   (data_in),
    .data_out  (data_out),
    .out_strobe(out_strobe),
    .acc       (acc)
  );
endmodule
