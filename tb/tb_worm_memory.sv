// tb_worm_memory: reads every line of the default (running averager) print
// pattern and compares it with the expected words, written out by hand from
// the instruction format {spare, regsel[1:0], fn[2:0], b_from_in, dest[1:0]};
// then prints a random pattern into a second instance and checks that each
// column reads the OR of the printed connections on the selected line,
// including the all-lines-deselected case.
module tb_worm_memory;
  localparam int ROWS = 16, IW = 9;
  localparam logic [ROWS-1:0][IW-1:0] RANDOM_PRINT = {
    9'h1F3, 9'h0A5, 9'h13C, 9'h000, 9'h1FF, 9'h081, 9'h042, 9'h124,
    9'h018, 9'h0C3, 9'h155, 9'h0AA, 9'h100, 9'h001, 9'h076, 9'h18E};
  logic [ROWS-1:0] sel;
  logic [IW-1:0]   data_avg, data_rnd;
  logic            clk = 1'b0;
  int              checks = 0, failures = 0;
  logic [IW-1:0]   expect_avg[ROWS] = '{
    9'h005, 9'h021, 9'h0E1, 9'h031, 9'h002, 9'h005, 9'h021, 9'h003,
    9'h031, 9'h002, 9'h000, 9'h000, 9'h000, 9'h000, 9'h000, 9'h000};

  worm_memory #(.ROWS(ROWS), .IW(IW)) dut_avg (.sel(sel), .data(data_avg));
  worm_memory #(.ROWS(ROWS), .IW(IW), .PROGRAM(RANDOM_PRINT)) dut_rnd (.sel(sel), .data(data_rnd));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      sel = '0;
      sel[r] = 1'b1;
      #1;
      checks++;
      if (data_avg != expect_avg[r]) begin failures++; $display("FAIL line %0d: %03h exp %03h", r, data_avg, expect_avg[r]); end
      checks++;
      if (data_rnd != RANDOM_PRINT[r]) begin failures++; $display("FAIL random line %0d: %03h exp %03h", r, data_rnd, RANDOM_PRINT[r]); end
    end
    sel = '0;
    #1;
    checks++;
    if (data_rnd != '0) begin failures++; $display("FAIL no line selected: %03h", data_rnd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
