// tb_program_counter: the PC starts at 0 after reset, advances by one each
// cycle and wraps from 15 to 0.
module tb_program_counter;
  localparam int N = 4;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] pc;
  int           checks = 0, failures = 0, wraps = 0;

  program_counter #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .pc(pc));

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
    rst_n = 1'b1;
    for (int n = 0; n < 100; n++) begin
      checks++;
      if (int'(pc) != n % 16) begin failures++; $display("FAIL cycle %0d pc=%0d", n, pc); end
      if (n > 0 && pc == 0) wraps++;
      @(negedge clk);
    end
    checks++;
    if (wraps != 6) begin failures++; $display("FAIL wraps=%0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
