// tb_mirror_adder: exhaustive check of the mirror-adder full-adder cell
// against a + b + ci computed with integer arithmetic; the cell's outputs
// are inverted, so the test compares {~co_n, ~s_n}.
module tb_mirror_adder;
  logic a, b, ci, s_n, co_n;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  mirror_adder dut (.a(a), .b(b), .ci(ci), .s_n(s_n), .co_n(co_n));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, ci} = 3'(v);
      total = int'(a) + int'(b) + int'(ci);
      #1;
      checks++;
      if ({~co_n, ~s_n} != 2'(total)) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b -> co_n=%0b s_n=%0b", a, b, ci, co_n, s_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
