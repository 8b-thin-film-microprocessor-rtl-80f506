// tb_ripple_carry_adder: exhaustive check of the 8-bit ripple-carry adder
// (all a, b and carry-in values) against integer addition, plus an
// exhaustive check of a 5-bit instance, whose chain ends on an inverted carry.
module tb_ripple_carry_adder;
  localparam int W = 8;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  logic         clk = 1'b0;
  int           checks = 0, failures = 0;

  logic [4:0]   a5, b5, sum5;
  logic         cout5;

  ripple_carry_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  ripple_carry_adder #(.W(5)) dut5 (.a(a5), .b(b5), .cin(cin), .sum(sum5), .cout(cout5));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 2**W; x++) begin
      for (int y = 0; y < 2**W; y++) begin
        for (int c = 0; c < 2; c++) begin
          int total;
          a = W'(x); b = W'(y); cin = 1'(c);
          a5 = 5'(x); b5 = 5'(y);
          total = x + y + c;
          #1;
          checks++;
          if ({cout, sum} != (W+1)'(total)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d -> %0d", x, y, c, {cout, sum});
          end
          if (x < 32 && y < 32) begin
            checks++;
            if ({cout5, sum5} != 6'(total)) begin
              failures++;
              if (failures < 10) $display("FAIL 5-bit %0d+%0d+%0d -> %0d", x, y, c, {cout5, sum5});
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
