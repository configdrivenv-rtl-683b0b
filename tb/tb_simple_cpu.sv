// tb_simple_cpu: self-checking testbench for the 16-bit processor.
//
// A reference model written here (a four-entry array of 16-bit words and a
// PC counter) is updated alongside the processor. Stimulus: reset held for
// five clocks with all outputs checked at zero; a directed sequence with the
// worked example ADD r2,-94 from zero (r2 = 0xFFA2) and its wrong-operator
// twin, and carries/borrows through 0xFFFF; then NUM_INSTR random
// instructions drawn uniformly from NOP/ADD/SUB/MOV/XOR with a random rd and
// an immediate in [-128, +127]; finally HALT, after which further
// instructions must change nothing. One instruction is driven per clock, and
// after each clock all four registers, the PC and the halt flag are compared
// with the model, so the one-instruction-per-clock rate is checked as well.
module tb_simple_cpu;
  import cpu_pkg::*;

  localparam int NUM_INSTR = 1000;
  localparam int WATCHDOG  = 20000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  cpu_if vif (clk);

  simple_cpu dut (
    .clk  (clk),
    .rst  (vif.rst),
    .instr(vif.instr),
    .pc   (vif.pc),
    .halt (vif.halt),
    .r0   (vif.r0),
    .r1   (vif.r1),
    .r2   (vif.r2),
    .r3   (vif.r3)
  );

  int checks = 0;
  int failures = 0;

  logic [15:0] m_r [4];
  logic [7:0]  m_pc;
  logic        m_halt;
  int          op_seen [16];

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic check_all(string tag);
    check({tag, " r0"}, 32'(vif.r0), 32'(m_r[0]));
    check({tag, " r1"}, 32'(vif.r1), 32'(m_r[1]));
    check({tag, " r2"}, 32'(vif.r2), 32'(m_r[2]));
    check({tag, " r3"}, 32'(vif.r3), 32'(m_r[3]));
    check({tag, " pc"}, 32'(vif.pc), 32'(m_pc));
    check({tag, " halt"}, 32'(vif.halt), 32'(m_halt));
  endtask

  // Independent model of one instruction.
  task automatic model(logic [15:0] w);
    logic [3:0]  op  = w[15:12];
    logic [1:0]  rd  = w[9:8];
    int          imm = int'($signed(w[7:0]));
    int          v;
    if (m_halt) return;
    if (op == 4'hF) begin
      m_halt = 1'b1;
      return;
    end
    v = int'(m_r[rd]);
    case (op)
      4'h1: v = v + imm;
      4'h2: v = v - imm;
      4'h3: v = imm;
      4'h4: v = v ^ imm;
      default: ;
    endcase
    m_r[rd] = v[15:0];
    m_pc    = m_pc + 8'd1;
  endtask

  // Called at a falling edge: the word is executed at the next rising edge
  // and checked at the falling edge after it, where the next word is driven.
  task automatic exec(logic [15:0] w);
    vif.instr = w;
    op_seen[w[15:12]]++;
    model(w);
    @(negedge clk);
    check_all($sformatf("instr %h", w));
  endtask

  function automatic logic [15:0] rand_instr();
    logic [3:0] op;
    op = 4'($urandom_range(0, 4));
    return {op, 2'($urandom), 2'($urandom), 8'($urandom)};
  endfunction

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_r = '{default: 16'h0};
    m_pc = '0;
    m_halt = 1'b0;
    vif.instr = 16'h0000;
    vif.rst = 1'b1;
    // Five clocks of reset: outputs must sit at zero throughout.
    repeat (5) begin
      @(negedge clk);
      vif.instr = rand_instr();  // must be ignored under reset
      check_all("reset");
    end
    @(negedge clk);
    vif.rst = 1'b0;

    // Worked example: ADD r2,-94 from zero gives 0xFFA2 (a subtracting adder would give 0x005E).
    exec(16'h12A2);
    check("ADD r2,-94", 32'(vif.r2), 32'h0000_FFA2);
    exec(encode(OP_MOV, 2'd0, 8'd15));
    exec(encode(OP_MOV, 2'd3, 8'd5));
    exec(encode(OP_ADD, 2'd0, 8'd1));
    check("ADD r0,+1", 32'(vif.r0), 32'h0000_0010);
    // Wrap-around: 0xFFFF + 1 = 0, 0 - 1 = 0xFFFF, XOR with -1 inverts.
    exec(encode(OP_MOV, 2'd1, 8'hFF));
    exec(encode(OP_ADD, 2'd1, 8'd1));
    check("wrap up", 32'(vif.r1), 32'h0);
    exec(encode(OP_SUB, 2'd1, 8'd1));
    check("wrap down", 32'(vif.r1), 32'h0000_FFFF);
    exec(encode(OP_XOR, 2'd1, 8'hFF));
    check("xor -1", 32'(vif.r1), 32'h0);
    exec(encode(OP_SUB, 2'd2, 8'h80));     // r2 - (-128)
    exec(encode(OP_XOR, 2'd3, 8'h7F));
    exec(16'h5123);                        // unlisted opcode behaves as NOP
    exec(16'h0C00);                        // unused bits set

    for (int i = 0; i < NUM_INSTR; i++) exec(rand_instr());

    // HALT: halt rises, and later instructions change nothing.
    exec(encode(OP_HALT, 2'd0, 8'd0));
    check("halt set", 32'(vif.halt), 32'd1);
    for (int i = 0; i < 20; i++) exec(rand_instr());

    // Reset clears everything again.
    vif.rst = 1'b1;
    @(negedge clk);
    vif.rst = 1'b0;
    m_r = '{default: 16'h0};
    m_pc = '0;
    m_halt = 1'b0;
    check_all("re-reset");

    for (int op = 0; op < 5; op++) begin
      checks++;
      if (op_seen[op] == 0) begin
        failures++;
        $display("FAIL opcode %0d never issued", op);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
