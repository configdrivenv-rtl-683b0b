// uart_rx: serial receiver for start / 8 data / even parity / stop frames.
//
// The line `rx` passes through a two-flop synchronizer. In IDLE the receiver
// waits for a low level; it then waits half a bit time (BAUD_DIV/2 clocks)
// and checks that the line is still low, which places every later sample in
// the middle of its bit. It then samples one bit every BAUD_DIV clocks: eight
// data bits, shifted in least significant bit first, the parity bit and the
// stop bit. A high stop bit completes the frame: data_out takes the shifted
// byte and data_valid is high for one clock; parity_err, updated in the same
// clock, is high when data plus parity bit hold an odd number of ones. A low
// stop bit drops the byte and pulses frame_err instead. A start bit that is
// gone at its middle is taken as a glitch and ignored.
//
// Interface: clk, rst (active high, synchronous), rx; outputs data_out[7:0],
// data_valid, parity_err, frame_err. data_valid rises 2 + 10.5 * BAUD_DIV
// clocks (give or take one) after the falling edge of the start bit, in the
// middle of the stop bit.
//
// The frame format, the state sequence ending in a STOP state that copies the
// shift register to data_out, the one-clock data_valid pulse and the
// baud_div parameter of 10 follow the published UART. The mid-bit sampling,
// the synchronizer and the parity and framing error outputs are this
// design's own choices.
module uart_rx
  import uart_pkg::*;
#(
  parameter int unsigned BAUD_DIV = 10  // clocks per bit
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 rx,
  output logic [DATA_BITS-1:0] data_out,
  output logic                 data_valid,
  output logic                 parity_err,
  output logic                 frame_err
);

  typedef enum logic [2:0] {
    S_IDLE   = 3'd0,
    S_START  = 3'd1,
    S_DATA   = 3'd2,
    S_PARITY = 3'd3,
    S_STOP   = 3'd4
  } state_t;

  localparam int unsigned CW = (BAUD_DIV > 1) ? $clog2(BAUD_DIV) : 1;

  state_t               state;
  logic [1:0]           sync;
  logic                 rx_s;
  logic [CW-1:0]        baud_cnt;
  logic [2:0]           bit_idx;
  logic [DATA_BITS-1:0] shift_reg;
  logic                 par_bit;

  assign rx_s = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync       <= 2'b11;
      state      <= S_IDLE;
      baud_cnt   <= '0;
      bit_idx    <= '0;
      shift_reg  <= '0;
      par_bit    <= 1'b0;
      data_out   <= '0;
      data_valid <= 1'b0;
      parity_err <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      sync       <= {sync[0], rx};
      data_valid <= 1'b0;
      frame_err  <= 1'b0;
      if (state != S_IDLE && baud_cnt != '0) begin
        baud_cnt <= baud_cnt - 1'b1;
      end else begin
        unique case (state)
          S_IDLE: if (!rx_s) begin
            state    <= S_START;
            baud_cnt <= CW'(BAUD_DIV / 2 - 1);
          end
          S_START: begin
            if (!rx_s) begin
              state    <= S_DATA;
              baud_cnt <= CW'(BAUD_DIV - 1);
              bit_idx  <= '0;
            end else begin
              state <= S_IDLE;
            end
          end
          S_DATA: begin
            shift_reg <= {rx_s, shift_reg[DATA_BITS-1:1]};
            baud_cnt  <= CW'(BAUD_DIV - 1);
            bit_idx   <= bit_idx + 1'b1;
            if (bit_idx == 3'(DATA_BITS - 1)) state <= S_PARITY;
          end
          S_PARITY: begin
            par_bit  <= rx_s;
            baud_cnt <= CW'(BAUD_DIV - 1);
            state    <= S_STOP;
          end
          S_STOP: begin
            if (rx_s) begin
              data_out   <= shift_reg;
              data_valid <= 1'b1;
              parity_err <= even_parity(shift_reg) ^ par_bit;
            end else begin
              frame_err <= 1'b1;
            end
            state <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // data_valid and frame_err are single-clock pulses and never coincide.
  a_valid_pulse: assert property (@(posedge clk) disable iff (rst) data_valid |=> !data_valid)
    else $error("uart_rx: data_valid longer than one clock");
  a_exclusive: assert property (@(posedge clk) disable iff (rst) !(data_valid && frame_err))
    else $error("uart_rx: data_valid and frame_err together");

  initial assert (BAUD_DIV >= 2) else $error("uart_rx: BAUD_DIV must be at least 2");

endmodule
