// tb_uart_loopback: the UART regression of twenty boundary bytes, with the
// transmitter output wired straight to the receiver input.
//
// Bytes: all zeros and all ones (0x00, 0xFF), alternating patterns (0xA5,
// 0x5A, 0x55, 0xAA), single set bits (0x01, 0x80), nibbles (0x0F, 0xF0) and
// ten values rising from 0x12 to 0x7E in steps of 12. Each byte is sent with
// tx_start, and the byte that the receiver reports with data_valid is
// compared with it; a vector passes when the byte matches, parity_err is low
// and data_valid came within 11 bit times of tx_start. The testbench prints
// the PASS/FAIL tally over the twenty vectors.
module tb_uart_loopback;

  localparam int unsigned BAUD_DIV = 10;

  logic       clk = 1'b0;
  logic       rst;
  logic       tx_start;
  logic [7:0] tx_data;
  logic       line;
  logic       tx_busy;
  logic [7:0] data_out;
  logic       data_valid;
  logic       parity_err;
  logic       frame_err;

  always #5 clk = ~clk;

  uart_tx u_tx (.clk, .rst, .tx_start, .tx_data, .tx(line), .tx_busy);
  uart_rx u_rx (.clk, .rst, .rx(line), .data_out, .data_valid, .parity_err, .frame_err);

  logic [7:0] vectors [20] = '{8'h00, 8'hFF, 8'hA5, 8'h5A, 8'h55, 8'hAA, 8'h01, 8'h80,
                               8'h0F, 8'hF0, 8'h12, 8'h1E, 8'h2A, 8'h36, 8'h42, 8'h4E,
                               8'h5A, 8'h66, 8'h72, 8'h7E};

  int checks = 0;
  int failures = 0;
  int pass_cnt = 0;
  int fail_cnt = 0;

  initial begin
    repeat (40 * 12 * BAUD_DIV) @(posedge clk);
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
    rst = 1'b0;
    @(negedge clk);
    foreach (vectors[i]) begin
      int  n;
      bit  got;
      tx_data  = vectors[i];
      tx_start = 1'b1;
      @(negedge clk);
      tx_start = 1'b0;
      n   = 0;
      got = 0;
      while (n < 12 * int'(BAUD_DIV) && !got) begin
        @(posedge clk);
        n++;
        if (data_valid) got = 1;
      end
      checks++;
      if (got && data_out === vectors[i] && !parity_err && n <= 11 * int'(BAUD_DIV)) begin
        pass_cnt++;
      end else begin
        fail_cnt++;
        failures++;
        $display("FAIL vector %0d: sent %h got %h (valid=%0d parity_err=%0d after %0d clocks)",
                 i, vectors[i], data_out, got, parity_err, n);
      end
      @(negedge clk);
      while (tx_busy) @(negedge clk);
    end
    $display("vectors: PASS=%0d FAIL=%0d", pass_cnt, fail_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
