// tb_processor_core: drives the core with random opcodes, register selects
// and input values, one instruction per cycle, and compares accumulator,
// output register and out_strobe after every edge with an instruction-level
// reference model written on raw opcode bits. Each instruction's result must
// be visible after exactly one rising edge.
module tb_processor_core;
  import mp_pkg::*;
  localparam int W = 8;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic [5:0]   op_raw = '0;
  logic [1:0]   sel_raw = '0;
  logic [W-1:0] din = '0, dout, acc;
  logic         strobe;
  int           checks = 0, failures = 0;
  int           m_acc, m_out, m_c[4];
  int           seen_fn[8];

  processor_core #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .opcode(opcode_t'(op_raw)), .regsel(regsel_e'(sel_raw)),
    .data_in(din), .data_out(dout), .out_strobe(strobe), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one instruction of the reference model
  task automatic step(input logic [5:0] op, input logic [1:0] sel, input int in_v);
    int b, y, a;
    a = m_acc;
    if (op[2]) b = in_v;
    else if (sel == 2'd3) b = 1;
    else b = m_c[sel];
    case (op[5:3])
      3'd0: y = b;
      3'd1: y = a & b;
      3'd2: y = a | b;
      3'd3: y = 255 ^ a;
      3'd4: y = (a + b) % 256;
      3'd5: y = (a - b + 256) % 256;
      3'd6: y = a / 2;
      default: y = (a * 2) % 256;
    endcase
    case (op[1:0])
      2'd1: m_acc = y;
      2'd2: if (sel != 2'd3) m_c[sel] = a;
      2'd3: m_out = a;
      default: ;
    endcase
  endtask

  initial begin
    m_acc = 0; m_out = 0; m_c = '{0, 0, 0, 1};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      op_raw  = 6'($urandom);
      sel_raw = 2'($urandom);
      // bias towards accumulator writes so that values keep changing
      if (n % 3 == 0) op_raw[1:0] = 2'b01;
      din = W'($urandom);
      #1;
      checks++;
      if (strobe != (op_raw[1:0] == 2'b11)) begin failures++; $display("FAIL strobe"); end
      if (op_raw[1:0] == 2'b01) seen_fn[op_raw[5:3]]++;
      step(op_raw, sel_raw, int'(din));
      @(negedge clk);
      checks++;
      if (int'(acc) != m_acc || int'(dout) != m_out) begin
        failures++;
        if (failures < 20) $display("FAIL n=%0d op=%02h sel=%0d acc=%0h/%0h out=%0h/%0h", n, op_raw, sel_raw, acc, m_acc, dout, m_out);
      end
    end
    for (int f = 0; f < 8; f++) begin
      checks++;
      if (seen_fn[f] == 0) begin failures++; $display("FAIL function %0d never ran", f); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
