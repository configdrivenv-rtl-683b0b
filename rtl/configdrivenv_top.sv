// configdrivenv_top: the two devices under test side by side, the 16-bit
// processor and the UART.
//
// The processor and the UART are unrelated designs that share only the clock
// and the reset. The processor takes one instruction word per clock on
// cpu_instr and shows its program counter, halt flag and four registers. The
// UART transmitter serialises uart_tx_data when uart_tx_start is high and
// drives uart_tx; the receiver decodes frames arriving on uart_rx. In the
// loopback set-up the verification environment connects uart_tx to uart_rx
// outside this module, so either half can also be driven on its own.
//
// Interface and timing are those of simple_cpu, uart_tx and uart_rx; BAUD_DIV
// (default 10 clocks per bit) sets the bit time of both UART halves.
//
// Grouping both devices under one top, with the loopback left to the
// surrounding environment, is this design's own choice.
module configdrivenv_top
  import cpu_pkg::*;
#(
  parameter int unsigned BAUD_DIV = 10
) (
  input  logic        clk,
  input  logic        rst,
  // processor
  input  logic [15:0] cpu_instr,
  output pc_t         cpu_pc,
  output logic        cpu_halt,
  output word_t       cpu_r0,
  output word_t       cpu_r1,
  output word_t       cpu_r2,
  output word_t       cpu_r3,
  // UART transmitter
  input  logic        uart_tx_start,
  input  logic [7:0]  uart_tx_data,
  output logic        uart_tx,
  output logic        uart_tx_busy,
  // UART receiver
  input  logic        uart_rx,
  output logic [7:0]  uart_rx_data,
  output logic        uart_rx_valid,
  output logic        uart_rx_parity_err,
  output logic        uart_rx_frame_err
);

  simple_cpu u_cpu (
    .clk   (clk),
    .rst   (rst),
    .instr (cpu_instr),
    .pc    (cpu_pc),
    .halt  (cpu_halt),
    .r0    (cpu_r0),
    .r1    (cpu_r1),
    .r2    (cpu_r2),
    .r3    (cpu_r3)
  );

  uart_tx #(.BAUD_DIV(BAUD_DIV)) u_uart_tx (
    .clk      (clk),
    .rst      (rst),
    .tx_start (uart_tx_start),
    .tx_data  (uart_tx_data),
    .tx       (uart_tx),
    .tx_busy  (uart_tx_busy)
  );

  uart_rx #(.BAUD_DIV(BAUD_DIV)) u_uart_rx (
    .clk        (clk),
    .rst        (rst),
    .rx         (uart_rx),
    .data_out   (uart_rx_data),
    .data_valid (uart_rx_valid),
    .parity_err (uart_rx_parity_err),
    .frame_err  (uart_rx_frame_err)
  );

endmodule
