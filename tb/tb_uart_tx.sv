// tb_uart_tx: self-checking testbench for the UART transmitter.
//
// For each byte the testbench raises tx_start for one clock and then samples
// the line once in every clock of the frame: clock c of bit b must show bit b
// of the expected frame (start 0, data LSB first, even parity computed here
// from the byte, stop 1), so every bit is checked to last exactly BAUD_DIV
// clocks, and tx_busy must be high for exactly 11 * BAUD_DIV clocks. Bytes:
// the twenty boundary patterns of the UART test set, then random bytes. One
// frame is also started while a frame is in flight, which must be ignored.
module tb_uart_tx;

  localparam int unsigned BAUD_DIV = 10;  // the default of the block
  localparam int          NRAND    = 40;
  localparam int          WATCHDOG = 200000;

  logic       clk = 1'b0;
  logic       rst;
  logic       tx_start;
  logic [7:0] tx_data;
  logic       tx;
  logic       tx_busy;

  always #5 clk = ~clk;

  uart_tx dut (.*);

  int checks = 0;
  int failures = 0;

  logic [7:0] vectors [20] = '{8'h00, 8'hFF, 8'hA5, 8'h5A, 8'h55, 8'hAA, 8'h01, 8'h80,
                               8'h0F, 8'hF0, 8'h12, 8'h1E, 8'h2A, 8'h36, 8'h42, 8'h4E,
                               8'h5A, 8'h66, 8'h72, 8'h7E};

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (t=%0t)", what, got, exp, $time);
    end
  endtask

  // Called at a falling edge with the transmitter idle.
  task automatic send_and_check(logic [7:0] d, bit poke_mid_frame);
    logic [10:0] frame;
    frame = {1'b1, ^d, d, 1'b0};
    tx_data  = d;
    tx_start = 1'b1;
    @(negedge clk);
    tx_start = 1'b0;
    for (int b = 0; b < 11; b++) begin
      for (int c = 0; c < int'(BAUD_DIV); c++) begin
        check($sformatf("byte %h bit %0d clk %0d", d, b, c), tx, frame[b]);
        check("busy in frame", tx_busy, 1'b1);
        if (poke_mid_frame && b == 3 && c == 0) begin
          tx_data  = ~d;
          tx_start = 1'b1;  // must be ignored
        end else begin
          tx_start = 1'b0;
        end
        @(negedge clk);
      end
    end
    check("busy falls after 11 bit times", tx_busy, 1'b0);
    check("line idles high", tx, 1'b1);
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
    tx_start = 1'b0;
    tx_data = '0;
    repeat (5) @(negedge clk);
    check("idle high after reset", tx, 1'b1);
    check("idle not busy", tx_busy, 1'b0);
    rst = 1'b0;
    @(negedge clk);
    foreach (vectors[i]) send_and_check(vectors[i], i == 2);
    for (int i = 0; i < NRAND; i++) begin
      send_and_check(8'($urandom), 1'b0);
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
