// processor_core: the 8-bit processor core chip.
//
// An accumulator machine that executes one instruction per clock cycle. The
// ALU combines the accumulator (A) with either the C-register picked by the
// 2 register-select bits or the input bus (B). Depending on the opcode's
// destination field the rising clock edge then writes the ALU result into the
// accumulator, or writes the accumulator into the selected C-register or into
// the output register; destination "none" is a NOOP. The fourth C-register is
// a hard-wired 1, so INC/DEC are ADD/SUB with regsel = 3.
//
// Interface: opcode (6 bits) and regsel (2 bits) come from the instruction
// generator's register and are valid for the whole cycle; data_in is the input
// bus, sampled through the ALU at the end of the cycle that uses it; data_out
// is the output register and out_strobe is high during the cycle whose edge
// writes it. Asynchronous active-low reset clears all registers.
//
// The functions, the register set and the 6+2 control bits follow the
// document. The opcode encoding, storing to C-registers/output from the
// accumulator, and the reset are this design's choices.
module processor_core
  import mp_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  opcode_t      opcode,
  input  regsel_e      regsel,
  input  logic [W-1:0] data_in,
  output logic [W-1:0] data_out,
  output logic         out_strobe,
  output logic [W-1:0] acc
);
  ctrl_t        ctrl;
  logic [W-1:0] creg;
  logic [W-1:0] b;
  logic [W-1:0] alu_y;
  logic         alu_cout;  // carry out of the adder; no flag register holds it

  core_decoder u_dec (
    .opcode(opcode),
    .ctrl  (ctrl)
  );

  c_registers #(.W(W)) u_cregs (
    .clk  (clk),
    .rst_n(rst_n),
    .sel  (regsel),
    .we   (ctrl.creg_we),
    .wdata(acc),
    .rdata(creg)
  );

  assign b = ctrl.b_from_in ? data_in : creg;

  alu #(.W(W)) u_alu (
    .fn  (ctrl.fn),
    .a   (acc),
    .b   (b),
    .y   (alu_y),
    .cout(alu_cout)
  );

  data_register #(.W(W)) u_acc (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (ctrl.acc_we),
    .d    (alu_y),
    .q    (acc)
  );

  data_register #(.W(W)) u_out (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (ctrl.out_we),
    .d    (acc),
    .q    (data_out)
  );

  assign out_strobe = ctrl.out_we;
endmodule
