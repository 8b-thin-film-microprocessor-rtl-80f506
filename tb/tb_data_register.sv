// tb_data_register: reset value, load with enable, hold without enable.
module tb_data_register;
  localparam int W = 8;
  logic         clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] d = '0, q;
  logic [W-1:0] model = '0;
  int           checks = 0, failures = 0;

  data_register #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

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
      @(negedge clk);
      en = 1'($urandom_range(1));
      d  = W'($urandom);
      if (en) model = d;
      @(negedge clk);
      en = 1'b0;
      checks++;
      if (q != model) begin failures++; $display("FAIL q=%0h exp %0h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
