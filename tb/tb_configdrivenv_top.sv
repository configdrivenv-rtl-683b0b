// tb_configdrivenv_top: end-to-end testbench for both devices at their
// default sizes.
//
// Two independent streams run in parallel on the shared clock.
//
// Processor: after five clocks of reset, the worked example ADD r2,-94 and
// then NUM_INSTR random instructions (uniform over NOP/ADD/SUB/MOV/XOR, random
// rd, immediate in [-128, +127]) are driven one per clock. A reference model
// written here predicts r0..r3 and the PC after every instruction; after each
// clock all of them are compared, the way a register-checkpoint scoreboard
// does. HALT ends the program, and instructions after it must change nothing.
//
// UART: the transmitter output is looped back to the receiver. The twenty
// boundary bytes (0x00, 0xFF, 0xA5, 0x5A, 0x55, 0xAA, 0x01, 0x80, 0x0F, 0xF0
// and ten values from 0x12 to 0x7E) and then random bytes are sent, some
// back to back; each received byte is compared with the one sent, and every
// frame must take 11 bit times. The loop is then opened and the testbench
// drives the receiver itself with a parity error and a framing error.
//
// Every mechanism is counted (each opcode, HALT, 16-bit wrap-around, reset,
// a tx_start ignored while busy, back-to-back frames, parity and framing
// errors); one that never happened is a failure.
module tb_configdrivenv_top;
  import cpu_pkg::*;

  localparam int          NUM_INSTR = 1000;
  localparam int          NRAND_UART = 30;
  localparam int unsigned BAUD_DIV = 10;  // the top's default
  localparam int          WATCHDOG = 200000;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;

  logic [15:0] cpu_instr;
  pc_t         cpu_pc;
  logic        cpu_halt;
  word_t       cpu_r0, cpu_r1, cpu_r2, cpu_r3;
  logic        uart_tx_start;
  logic [7:0]  uart_tx_data;
  logic        uart_tx;
  logic        uart_tx_busy;
  logic        uart_rx;
  logic [7:0]  uart_rx_data;
  logic        uart_rx_valid;
  logic        uart_rx_parity_err;
  logic        uart_rx_frame_err;

  logic        loop_en;
  logic        tb_rx;
  assign uart_rx = loop_en ? uart_tx : tb_rx;

  configdrivenv_top dut (.*);

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_op [16];
  int n_wrap = 0, n_reset = 0, n_halt_hold = 0;
  int n_frames = 0, n_b2b = 0, n_ignored = 0, n_perr = 0, n_ferr = 0;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic need(string what, int count);
    checks++;
    $display("mechanism %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  // ---------------- processor stream ----------------
  logic [15:0] m_r [4];
  logic [7:0]  m_pc;
  logic        m_halt;
  bit          cpu_done = 0;

  task automatic model(logic [15:0] w);
    int imm, v;
    if (m_halt) begin
      n_halt_hold++;
      return;
    end
    if (w[15:12] == 4'hF) begin
      m_halt = 1'b1;
      return;
    end
    imm = int'($signed(w[7:0]));
    v   = int'(m_r[w[9:8]]);
    case (w[15:12])
      4'h1: v = v + imm;
      4'h2: v = v - imm;
      4'h3: v = imm;
      4'h4: v = v ^ imm;
      default: ;
    endcase
    if ((w[15:12] == 4'h1 || w[15:12] == 4'h2) && (v < 0 || v > 16'hFFFF)) n_wrap++;
    m_r[w[9:8]] = v[15:0];
    m_pc = m_pc + 8'd1;
  endtask

  task automatic cpu_check(string tag);
    check({tag, " r0"}, 32'(cpu_r0), 32'(m_r[0]));
    check({tag, " r1"}, 32'(cpu_r1), 32'(m_r[1]));
    check({tag, " r2"}, 32'(cpu_r2), 32'(m_r[2]));
    check({tag, " r3"}, 32'(cpu_r3), 32'(m_r[3]));
    check({tag, " pc"}, 32'(cpu_pc), 32'(m_pc));
    check({tag, " halt"}, 32'(cpu_halt), 32'(m_halt));
  endtask

  // Called at a falling edge; checks at the next one.
  task automatic cpu_exec(logic [15:0] w);
    cpu_instr = w;
    if (!m_halt) n_op[w[15:12]]++;
    model(w);
    @(negedge clk);
    cpu_check($sformatf("instr %h", w));
  endtask

  initial begin : cpu_stream
    m_r = '{default: 16'h0};
    m_pc = '0;
    m_halt = 1'b0;
    cpu_instr = 16'h0;
    @(negedge clk);
    wait (!rst);
    n_reset++;
    cpu_check("after reset");
    cpu_exec(16'h12A2);
    check("ADD r2,-94 from 0", 32'(cpu_r2), 32'h0000_FFA2);
    for (int i = 0; i < NUM_INSTR; i++)
      cpu_exec({4'($urandom_range(0, 4)), 2'b00, 2'($urandom), 8'($urandom)});
    cpu_exec(encode(OP_HALT, 2'd0, 8'd0));
    for (int i = 0; i < 8; i++)
      cpu_exec({4'($urandom_range(0, 4)), 2'b00, 2'($urandom), 8'($urandom)});
    cpu_done = 1;
  end

  // ---------------- UART stream ----------------
  logic [7:0] vectors [20] = '{8'h00, 8'hFF, 8'hA5, 8'h5A, 8'h55, 8'hAA, 8'h01, 8'h80,
                               8'h0F, 8'hF0, 8'h12, 8'h1E, 8'h2A, 8'h36, 8'h42, 8'h4E,
                               8'h5A, 8'h66, 8'h72, 8'h7E};
  logic [7:0] sent_q [$];
  int         sent_clk_q [$];
  int         clk_count = 0;
  bit         uart_done = 0;

  // Receive-side scoreboard.
  always @(posedge clk) begin
    clk_count++;
    if (!rst && uart_rx_valid && loop_en) begin
      if (sent_q.size() == 0) begin
        checks++;
        failures++;
        $display("FAIL unexpected byte %h", uart_rx_data);
      end else begin
        logic [7:0] exp;
        int t0;
        exp = sent_q.pop_front();
        t0  = sent_clk_q.pop_front();
        check("loopback byte", 32'(uart_rx_data), 32'(exp));
        check("loopback parity ok", 32'(uart_rx_parity_err), 0);
        checks++;
        if (clk_count - t0 <= 10 * int'(BAUD_DIV) || clk_count - t0 > 11 * int'(BAUD_DIV) + 4) begin
          failures++;
          $display("FAIL byte %h took %0d clocks", exp, clk_count - t0);
        end
        n_frames++;
      end
    end
    if (!rst && uart_rx_valid && !loop_en && uart_rx_parity_err) n_perr++;
    if (!rst && uart_rx_frame_err) n_ferr++;
  end

  // Called at a falling edge with the transmitter idle; returns when it is idle again.
  task automatic uart_send(logic [7:0] d, bit poke);
    uart_tx_data  = d;
    uart_tx_start = 1'b1;
    @(negedge clk);
    sent_q.push_back(d);
    sent_clk_q.push_back(clk_count - 1);
    uart_tx_start = 1'b0;
    if (poke) begin
      repeat (3 * BAUD_DIV) @(negedge clk);
      uart_tx_data  = ~d;
      uart_tx_start = 1'b1;  // must be ignored while busy
      @(negedge clk);
      uart_tx_start = 1'b0;
      n_ignored++;
    end
    while (uart_tx_busy) @(negedge clk);
  endtask

  task automatic drive_frame(logic [7:0] d, bit bad_parity, bit bad_stop);
    logic [10:0] f;
    f = {~bad_stop, (^d) ^ bad_parity, d, 1'b0};
    for (int b = 0; b < 11; b++) begin
      tb_rx = f[b];
      repeat (BAUD_DIV) @(negedge clk);
    end
    tb_rx = 1'b1;
    repeat (2 * BAUD_DIV) @(negedge clk);
  endtask

  initial begin : uart_stream
    int p0, f0;
    uart_tx_start = 1'b0;
    uart_tx_data  = '0;
    loop_en = 1'b1;
    tb_rx   = 1'b1;
    @(negedge clk);
    wait (!rst);
    @(negedge clk);
    foreach (vectors[i]) uart_send(vectors[i], i == 5);
    // back to back: the next start is offered as soon as busy falls
    for (int i = 0; i < NRAND_UART; i++) begin
      uart_send(8'($urandom), 1'b0);
      n_b2b++;
    end
    repeat (3 * BAUD_DIV) @(negedge clk);
    check("all looped-back bytes received", 32'(sent_q.size()), 0);
    // open the loop and inject line errors
    loop_en = 1'b0;
    p0 = n_perr;
    drive_frame(8'hC3, 1'b1, 1'b0);
    check("parity error flagged", 32'(n_perr - p0), 1);
    f0 = n_ferr;
    drive_frame(8'h3C, 1'b0, 1'b1);
    check("framing error flagged", 32'(n_ferr - f0), 1);
    drive_frame(8'h96, 1'b0, 1'b0);
    check("clean frame after errors", 32'(uart_rx_data), 32'h96);
    check("parity clean after errors", 32'(uart_rx_parity_err), 0);
    uart_done = 1;
  end

  // ---------------- control ----------------
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    wait (cpu_done && uart_done);
    need("NOP", n_op[0]);
    need("ADD", n_op[1]);
    need("SUB", n_op[2]);
    need("MOV", n_op[3]);
    need("XOR", n_op[4]);
    need("HALT", n_op[15]);
    need("instruction ignored after HALT", n_halt_hold);
    need("16-bit wrap-around", n_wrap);
    need("reset", n_reset);
    need("looped-back frame", n_frames);
    need("back-to-back frame", n_b2b);
    need("tx_start ignored while busy", n_ignored);
    need("parity error", n_perr);
    need("framing error", n_ferr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
