// tb_alu: checks every ALU function on corner values and random operands
// against a reference written with plain integer operators, including INC
// and DEC (ADD and SUB with B = 1) and the adder carry out.
module tb_alu;
  import mp_pkg::*;
  localparam int W = 8;
  alu_fn_e      fn;
  logic [W-1:0] a, b, y;
  logic         cout;
  logic         clk = 1'b0;
  int           checks = 0, failures = 0;

  alu #(.W(W)) dut (.fn(fn), .a(a), .b(b), .y(y), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int f, input int x, input int z);
    int exp_y, exp_c;
    fn = alu_fn_e'(3'(f));
    a  = W'(x);
    b  = W'(z);
    exp_c = -1;
    case (f)
      0: exp_y = z;
      1: exp_y = x & z;
      2: exp_y = x | z;
      3: exp_y = 255 - x;
      4: begin exp_y = (x + z) % 256; exp_c = (x + z) / 256; end
      5: begin exp_y = (x - z + 256) % 256; exp_c = (x >= z) ? 1 : 0; end
      6: exp_y = x / 2;
      7: exp_y = (x * 2) % 256;
      default: exp_y = 0;
    endcase
    #1;
    checks++;
    if (int'(y) != exp_y || (exp_c >= 0 && int'(cout) != exp_c)) begin
      failures++;
      if (failures < 20) $display("FAIL fn=%0d a=%0d b=%0d -> y=%0d c=%0b exp %0d c=%0d", f, x, z, y, cout, exp_y, exp_c);
    end
  endtask

  initial begin
    int corners[6] = '{0, 1, 127, 128, 254, 255};
    for (int f = 0; f < 8; f++)
      foreach (corners[i])
        foreach (corners[j])
          check(f, corners[i], corners[j]);
    // INC and DEC wrap around
    check(4, 255, 1);
    check(5, 0, 1);
    for (int n = 0; n < 4000; n++)
      check(int'($urandom_range(7)), int'($urandom_range(255)), int'($urandom_range(255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
