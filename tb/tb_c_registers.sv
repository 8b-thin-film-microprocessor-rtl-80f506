// tb_c_registers: random writes and reads of the four C-registers. C1..C3
// must hold what was written; the fourth must always read 1 and ignore
// writes.
module tb_c_registers;
  import mp_pkg::*;
  localparam int W = 8;
  logic         clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  regsel_e      sel = SEL_C1;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model[4];
  int           checks = 0, failures = 0;

  c_registers #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .sel(sel), .we(we), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '{8'd0, 8'd0, 8'd0, 8'd1};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      // read one register
      sel = regsel_e'(2'($urandom_range(3)));
      we  = 1'b0;
      #1;
      checks++;
      if (rdata != model[sel]) begin failures++; $display("FAIL read C%0d=%0h exp %0h", int'(sel) + 1, rdata, model[sel]); end
      // maybe write one
      we    = 1'($urandom_range(1));
      sel   = regsel_e'(2'($urandom_range(3)));
      wdata = W'($urandom);
      if (we && sel != SEL_ONE) model[sel] = wdata;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
