// tb_p2rom_instruction_generator: after reset the instruction register holds
// a NOOP; then, cycle after cycle, it must present the printed word of the
// line the program counter selected one cycle earlier, lines 0..15 in
// order, repeating. Uses a random print pattern, so that every column and
// line is exercised, and the default averager pattern.
module tb_p2rom_instruction_generator;
  localparam int ROWS = 16, IW = 9;
  localparam logic [ROWS-1:0][IW-1:0] PRINT = {
    9'h1F3, 9'h0A5, 9'h13C, 9'h000, 9'h1FF, 9'h081, 9'h042, 9'h124,
    9'h018, 9'h0C3, 9'h155, 9'h0AA, 9'h100, 9'h001, 9'h076, 9'h18E};
  logic [IW-1:0]   expect_avg[ROWS] = '{
    9'h005, 9'h021, 9'h0E1, 9'h031, 9'h002, 9'h005, 9'h021, 9'h003,
    9'h031, 9'h002, 9'h000, 9'h000, 9'h000, 9'h000, 9'h000, 9'h000};
  logic            clk = 1'b0, rst_n = 1'b0;
  logic [IW-1:0]   instr, instr_avg;
  logic [3:0]      pc, pc_avg;
  int              checks = 0, failures = 0;

  p2rom_instruction_generator #(.ROWS(ROWS), .IW(IW), .PROGRAM(PRINT)) dut (
    .clk(clk), .rst_n(rst_n), .instr(instr), .pc(pc));
  p2rom_instruction_generator dut_avg (
    .clk(clk), .rst_n(rst_n), .instr(instr_avg), .pc(pc_avg));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (instr != '0 || pc != 0) begin failures++; $display("FAIL reset instr=%03h pc=%0d", instr, pc); end
    rst_n = 1'b1;
    for (int n = 1; n <= 64; n++) begin
      @(negedge clk);
      // cycle n: pc = n mod 16, instruction register = line (n-1) mod 16
      checks++;
      if (int'(pc) != n % 16) begin failures++; $display("FAIL cycle %0d pc=%0d", n, pc); end
      checks++;
      if (instr != PRINT[(n-1) % 16]) begin failures++; $display("FAIL cycle %0d instr=%03h exp %03h", n, instr, PRINT[(n-1) % 16]); end
      checks++;
      if (instr_avg != expect_avg[(n-1) % 16]) begin failures++; $display("FAIL cycle %0d avg instr=%03h exp %03h", n, instr_avg, expect_avg[(n-1) % 16]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
