// tb_core_decoder: all 64 opcodes; the write enables must follow the
// destination field bits [1:0] and the ALU function and B source must be
// taken from bits [5:3] and [2].
module tb_core_decoder;
  import mp_pkg::*;
  opcode_t op;
  ctrl_t   ctrl;
  logic    clk = 1'b0;
  int      checks = 0, failures = 0;

  core_decoder dut (.opcode(op), .ctrl(ctrl));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic [5:0] raw;
      raw = 6'(v);
      op  = opcode_t'(raw);
      #1;
      checks++;
      if (ctrl.acc_we  != (raw[1:0] == 2'b01) ||
          ctrl.creg_we != (raw[1:0] == 2'b10) ||
          ctrl.out_we  != (raw[1:0] == 2'b11) ||
          3'(ctrl.fn)  != raw[5:3] ||
          ctrl.b_from_in != raw[2]) begin
        failures++;
        $display("FAIL opcode %02h -> %b", raw, ctrl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
