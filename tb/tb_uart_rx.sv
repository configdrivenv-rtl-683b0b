// tb_uart_rx: self-checking testbench for the UART receiver.
//
// The testbench builds frames itself (start 0, data LSB first, parity, stop)
// and plays them onto rx, BAUD_DIV clocks per bit. For a good frame it checks
// that data_valid is high for exactly one clock, that data_out equals the
// byte sent, that parity_err is low, and that data_valid arrives in the stop
// bit, within 11 bit times of the start edge. It also sends frames with the
// parity bit inverted (parity_err must be set), frames with a low stop bit
// (frame_err must pulse and data_valid must stay low) and a short low glitch
// on an idle line (nothing may be received). Bytes: the twenty boundary
// patterns of the UART test set, then random bytes.
module tb_uart_rx;

  localparam int unsigned BAUD_DIV = 10;  // the default of the block
  localparam int          NRAND    = 40;
  localparam int          WATCHDOG = 300000;

  logic       clk = 1'b0;
  logic       rst;
  logic       rx;
  logic [7:0] data_out;
  logic       data_valid;
  logic       parity_err;
  logic       frame_err;

  always #5 clk = ~clk;

  uart_rx dut (.*);

  int checks = 0;
  int failures = 0;
  int valid_count = 0;
  int ferr_count = 0;
  logic [7:0] last_data;
  logic       last_perr;
  int         last_valid_clk;
  int         clk_count = 0;

  logic [7:0] vectors [20] = '{8'h00, 8'hFF, 8'hA5, 8'h5A, 8'h55, 8'hAA, 8'h01, 8'h80,
                               8'h0F, 8'hF0, 8'h12, 8'h1E, 8'h2A, 8'h36, 8'h42, 8'h4E,
                               8'h5A, 8'h66, 8'h72, 8'h7E};

  always @(posedge clk) begin
    clk_count++;
    if (!rst && data_valid) begin
      valid_count++;
      last_data      = data_out;
      last_perr      = parity_err;
      last_valid_clk = clk_count;
    end
    if (!rst && frame_err) ferr_count++;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // Plays one frame, then one idle bit time; checks what was received.
  task automatic send(logic [7:0] d, bit bad_parity, bit bad_stop);
    logic [10:0] frame;
    int v0, f0, t0;
    frame = {~bad_stop, (^d) ^ bad_parity, d, 1'b0};
    v0 = valid_count;
    f0 = ferr_count;
    t0 = clk_count;
    for (int b = 0; b < 11; b++) begin
      rx = frame[b];
      repeat (BAUD_DIV) @(negedge clk);
    end
    rx = 1'b1;
    repeat (BAUD_DIV) @(negedge clk);
    if (bad_stop) begin
      check("no byte on framing error", 32'(valid_count - v0), 0);
      check("frame_err pulse", 32'(ferr_count - f0), 1);
    end else begin
      check("one data_valid pulse", 32'(valid_count - v0), 1);
      check($sformatf("data %h", d), 32'(last_data), 32'(d));
      check($sformatf("parity_err %h", d), 32'(last_perr), 32'(bad_parity));
      check("no frame_err", 32'(ferr_count - f0), 0);
      checks++;
      if (last_valid_clk - t0 <= 10 * int'(BAUD_DIV) || last_valid_clk - t0 > 11 * int'(BAUD_DIV)) begin
        failures++;
        $display("FAIL data_valid at %0d clocks after the start edge", last_valid_clk - t0);
      end
    end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    rx = 1'b1;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    check("data_valid low after reset", 32'(data_valid), 0);
    foreach (vectors[i]) send(vectors[i], 1'b0, 1'b0);
    send(8'h3C, 1'b1, 1'b0);
    send(8'h81, 1'b0, 1'b1);
    send(8'h5A, 1'b0, 1'b0);
    // A glitch shorter than half a bit on an idle line is not a start bit.
    begin
      automatic int v0 = valid_count;
      automatic int f0 = ferr_count;
      rx = 1'b0;
      repeat (BAUD_DIV / 2 - 2) @(negedge clk);
      rx = 1'b1;
      repeat (20 * BAUD_DIV) @(negedge clk);
      check("glitch gives no byte", 32'(valid_count - v0), 0);
      check("glitch gives no frame_err", 32'(ferr_count - f0), 0);
    end
    for (int i = 0; i < NRAND; i++) begin
      automatic int kind = $urandom_range(0, 9);
      send(8'($urandom), kind == 0, kind == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
