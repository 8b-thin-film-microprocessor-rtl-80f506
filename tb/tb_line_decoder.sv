// tb_line_decoder: every address must select exactly its own line.
module tb_line_decoder;
  localparam int N = 4;
  logic [N-1:0]    addr;
  logic [2**N-1:0] sel;
  logic            clk = 1'b0;
  int              checks = 0, failures = 0;

  line_decoder #(.N(N)) dut (.addr(addr), .sel(sel));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**N; v++) begin
      addr = N'(v);
      #1;
      for (int r = 0; r < 2**N; r++) begin
        checks++;
        if (sel[r] != (r == v)) begin failures++; $display("FAIL addr=%0d line %0d = %0b", v, r, sel[r]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
