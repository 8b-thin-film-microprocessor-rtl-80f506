// tb_microprocessor_general: end-to-end test of the whole microprocessor
// with a general test program printed into the ROM, one that uses every
// function of the core: load from the input bus, ADD with the input bus,
// stores into C1, C2, C3 and the output register, AND, OR, NOT, ADD, SUB,
// INC, DEC, LSL, LSR and NOOP (with the spare column printed).
//
// The input bus gets a new random value every cycle. After every edge the
// instruction register is compared with the printed line the program counter
// selected one cycle before, and the accumulator and output register with an
// instruction-level reference model written on raw opcode bits. Each
// mechanism is counted; one that never happens is a failure.
module tb_microprocessor_general;
  // {spare, regsel[1:0], fn[2:0], b_from_in, dest[1:0]}
  localparam logic [15:0][8:0] TEST_PROGRAM = {
    9'h100,   // 15 NOOP, spare column printed
    9'h082,   // 14 C3  <- ACC
    9'h003,   // 13 OUT <- ACC
    9'h031,   // 12 LSR
    9'h039,   // 11 LSL
    9'h0E9,   // 10 DEC (SUB hard-wired 1)
    9'h0E1,   //  9 INC (ADD hard-wired 1)
    9'h069,   //  8 ACC <- ACC - C2
    9'h0A1,   //  7 ACC <- ACC + C3
    9'h019,   //  6 NOT
    9'h051,   //  5 ACC <- ACC | C2
    9'h009,   //  4 ACC <- ACC & C1
    9'h042,   //  3 C2  <- ACC
    9'h025,   //  2 ACC <- ACC + IN
    9'h002,   //  1 C1  <- ACC
    9'h005};  //  0 ACC <- IN

  typedef enum int {
    M_LOAD_IN, M_ADD_IN, M_STORE_C, M_STORE_OUT, M_AND, M_OR, M_NOT, M_ADD,
    M_SUB, M_INC, M_DEC, M_LSL, M_LSR, M_NOOP, M_SPARE, M_PC_WRAP, M_COUNT
  } mech_e;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] din = '0, dout, acc;
  logic       strobe, spare;
  logic [8:0] instr;
  logic [3:0] pc;
  int         checks = 0, failures = 0;
  int         count[M_COUNT];
  int         m_acc, m_out, m_c[4];

  microprocessor #(.PROGRAM(TEST_PROGRAM)) dut (
    .clk(clk), .rst_n(rst_n), .data_in(din), .data_out(dout), .out_strobe(strobe),
    .acc(acc), .instr(instr), .pc(pc), .spare(spare));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [8:0] w, input int in_v);
    logic [5:0] op;
    logic [1:0] sel;
    int a, b, y;
    op  = w[5:0];
    sel = w[7:6];
    a   = m_acc;
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
    // mechanisms
    if (w[8]) count[M_SPARE]++;
    case (op[1:0])
      2'd0: count[M_NOOP]++;
      2'd2: count[M_STORE_C]++;
      2'd3: count[M_STORE_OUT]++;
      default:
        case (op[5:3])
          3'd0: if (op[2]) count[M_LOAD_IN]++;
          3'd1: count[M_AND]++;
          3'd2: count[M_OR]++;
          3'd3: count[M_NOT]++;
          3'd4: if (op[2]) count[M_ADD_IN]++; else if (sel == 2'd3) count[M_INC]++; else count[M_ADD]++;
          3'd5: if (sel == 2'd3) count[M_DEC]++; else count[M_SUB]++;
          3'd6: count[M_LSR]++;
          default: count[M_LSL]++;
        endcase
    endcase
  endtask

  initial begin
    m_acc = 0; m_out = 0; m_c = '{0, 0, 0, 1};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 1; n <= 40 * 16; n++) begin
      @(negedge clk);
      // registers now hold the result of the instruction of cycle n-1
      checks++;
      if (int'(acc) != m_acc || int'(dout) != m_out) begin
        failures++;
        if (failures < 20) $display("FAIL cycle %0d acc=%0h/%0h out=%0h/%0h", n, acc, m_acc, dout, m_out);
      end
      // cycle n: the instruction register holds line (n-1) mod 16
      checks++;
      if (instr != TEST_PROGRAM[(n-1) % 16] || int'(pc) != n % 16) begin
        failures++;
        $display("FAIL cycle %0d instr=%03h pc=%0d", n, instr, pc);
      end
      if (pc == 0) count[M_PC_WRAP]++;
      checks++;
      if (strobe != (instr[1:0] == 2'b11) || spare != instr[8]) begin failures++; $display("FAIL strobe/spare cycle %0d", n); end
      din = 8'($urandom);
      step(instr, int'(din));
    end
    for (int k = 0; k < int'(M_COUNT); k++) begin
      checks++;
      $display("COUNT %s = %0d", mech_e'(k), count[k]);
      if (count[k] == 0) begin failures++; $display("FAIL mechanism %s never happened", mech_e'(k)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
