// uart_tx: serial transmitter for start / 8 data / even parity / stop frames.
//
// A byte offered on tx_data with tx_start high while tx_busy is low is loaded
// into an 11-bit frame shift register (stop, parity, data, start). The line
// `tx` then carries the start bit from the next clock on, and every bit is
// held for exactly BAUD_DIV clocks, data least significant bit first. tx_busy
// is high from the clock after tx_start until the stop bit has been on the
// line for its full BAUD_DIV clocks. tx_start is sampled again from the first
// clock edge that sees tx_busy low, so back-to-back frames are separated by a
// single idle (high) clock. tx_start while busy is ignored. The line idles
// high.
//
// Interface: clk, rst (active high, synchronous), tx_start, tx_data[7:0];
// outputs tx, tx_busy. A frame takes 11 * BAUD_DIV clocks.
//
// The frame format, the LSB-first order, the even parity and the clock
// divider parameter with its value of 10 follow the published UART. The
// start/busy handshake, the register-driven tx output and the synchronous
// reset are this design's own choices.
module uart_tx
  import uart_pkg::*;
#(
  parameter int unsigned BAUD_DIV = 10  // clocks per bit
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 tx_start,
  input  logic [DATA_BITS-1:0] tx_data,
  output logic                 tx,
  output logic                 tx_busy
);

  localparam int unsigned CW = (BAUD_DIV > 1) ? $clog2(BAUD_DIV) : 1;
  localparam int unsigned BW = $clog2(FRAME_BITS + 1);

  logic [FRAME_BITS-1:0] shreg;
  logic [CW-1:0]         baud_cnt;
  logic [BW-1:0]         bits_left;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '1;
      tx        <= 1'b1;
      tx_busy   <= 1'b0;
      baud_cnt  <= '0;
      bits_left <= '0;
    end else if (!tx_busy) begin
      tx <= 1'b1;
      if (tx_start) begin
        shreg     <= make_frame(tx_data) >> 1;
        tx        <= 1'b0;  // start bit
        tx_busy   <= 1'b1;
        baud_cnt  <= CW'(BAUD_DIV - 1);
        bits_left <= BW'(FRAME_BITS - 1);
      end
    end else if (baud_cnt != '0) begin
      baud_cnt <= baud_cnt - 1'b1;
    end else if (bits_left != '0) begin
      tx        <= shreg[0];
      shreg     <= {1'b1, shreg[FRAME_BITS-1:1]};
      baud_cnt  <= CW'(BAUD_DIV - 1);
      bits_left <= bits_left - 1'b1;
    end else begin
      tx_busy <= 1'b0;  // stop bit has lasted BAUD_DIV clocks
    end
  end

  // The line is high whenever no frame is in flight.
  a_idle_high: assert property (@(posedge clk) disable iff (rst) !tx_busy |-> tx)
    else $error("uart_tx: line low while idle");

  initial assert (BAUD_DIV >= 2) else $error("uart_tx: BAUD_DIV must be at least 2");

endmodule
