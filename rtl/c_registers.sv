// c_registers: the three writable C-registers and the hard-wired fourth one.
//
// sel picks one of four registers for both reading and writing. Registers
// C1..C3 (sel 0..2) are W-bit storage, written at the rising edge when we is
// high; register 4 (sel 3) always reads as the constant 1 and ignores writes,
// so that ADD and SUB with it give INC and DEC. Reading is combinational.
// Three registers plus a hard-wired 1 follow the document; the reset (async,
// active low, to 0) and ignoring writes to the constant are this design's.
module c_registers
  import mp_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  regsel_e      sel,
  input  logic         we,
  input  logic [W-1:0] wdata,
  output logic [W-1:0] rdata
);
  logic [2:0][W-1:0] c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= '0;
    end else if (we && sel != SEL_ONE) begin
      c[sel] <= wdata;
    end
  end

  always_comb begin
    if (sel == SEL_ONE) rdata = W'(1);
    else                rdata = c[sel];
  end
endmodule
