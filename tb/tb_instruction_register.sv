// tb_instruction_register: the register must reset to 0 (NOOP) and show,
// after each rising edge, the word present before that edge.
module tb_instruction_register;
  localparam int IW = 9;
  logic          clk = 1'b0, rst_n = 1'b0;
  logic [IW-1:0] d = '1, q;
  logic [IW-1:0] prev;
  int            checks = 0, failures = 0;

  instruction_register #(.IW(IW)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

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
    if (q != '0) begin failures++; $display("FAIL reset q=%0h", q); end
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      d    = IW'($urandom);
      prev = d;
      @(negedge clk);
      checks++;
      if (q != prev) begin failures++; $display("FAIL q=%0h exp %0h", q, prev); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
