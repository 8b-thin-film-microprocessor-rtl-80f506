// tb_microprocessor: the complete microprocessor at its default parameters,
// running the printed running-averager program.
//
// Part 1 repeats the measurement of the input step: the input is 0, then
// switches to 7 while the program is between its two passes. The output
// register must then show 7, C, E and stay at E.
// Part 2 holds random 6-bit inputs for whole program rounds and compares
// every output value with the running-average recurrence computed here:
//   s1 = in + x;  x1 = (s1 + 1) >> 1;  out = in + x1;  x = out >> 1
// It also checks that the output fits 7 bits and that one output is written
// every 16 cycles.
module tb_microprocessor;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] din = '0, dout, acc;
  logic       strobe, spare;
  logic [8:0] instr;
  logic [3:0] pc;
  int         checks = 0, failures = 0;
  int         outs[$];
  int         last_strobe = -1, cycle = 0;

  microprocessor dut (
    .clk(clk), .rst_n(rst_n), .data_in(din), .data_out(dout), .out_strobe(strobe),
    .acc(acc), .instr(instr), .pc(pc), .spare(spare));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record every value written into the output register, and the spacing
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && strobe) begin
      if (last_strobe >= 0) begin
        checks++;
        if (cycle - last_strobe != 16) begin
          failures++;
          $display("FAIL output period %0d cycles", cycle - last_strobe);
        end
      end
      last_strobe <= cycle;
    end
  end

  logic wrote = 1'b0;
  always @(posedge clk) wrote <= rst_n && strobe;
  always @(negedge clk) if (wrote) outs.push_back(int'(dout));

  task automatic wait_line(input int line);
    // wait until the instruction register holds the given line
    do @(negedge clk); while (int'(pc) != (line + 1) % 16);
  endtask

  initial begin
    int x, s1, x1, o, v;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // settle with input 0
    repeat (3) wait_line(15);
    checks++;
    if (outs.size() != 3 || outs[0] != 0 || outs[2] != 0) begin failures++; $display("FAIL zero input gives %p", outs); end
    outs.delete();
    // step 0 -> 7 after the first pass has read its input
    wait_line(2);
    din = 8'h07;
    repeat (5) wait_line(15);
        checks++;
    if (outs.size() != 5 || outs[0] != 'h7 || outs[1] != 'hC || outs[2] != 'hE || outs[3] != 'hE || outs[4] != 'hE) begin
      failures++;
      $display("FAIL step response %p, expected 7 C E E E", outs);
    end
    // random inputs, one per round
    x = 'hE >> 1;
    outs.delete();
    for (int n = 0; n < 200; n++) begin
      v = int'($urandom_range(63));
      din = 8'(v);
      wait_line(15);
      s1 = v + x;
      x1 = (s1 + 1) >> 1;
      o  = v + x1;
      x  = o >> 1;
      checks++;
      if (outs.size() != 1 || outs[0] != o || o > 127) begin
        failures++;
        $display("FAIL round %0d in=%0d out=%p exp %0d", n, v, outs, o);
      end
      outs.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
