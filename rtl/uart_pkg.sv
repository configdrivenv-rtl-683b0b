// uart_pkg: frame layout shared by the UART transmitter, receiver and their
// testbenches.
//
// A frame is one start bit (low), eight data bits sent least significant bit
// first, one even-parity bit and one stop bit (high): 11 bit times in all. The
// even parity bit makes the number of ones in data plus parity even, so it is
// the XOR of the eight data bits.
package uart_pkg;

  localparam int unsigned DATA_BITS  = 8;
  localparam int unsigned FRAME_BITS = 1 + DATA_BITS + 1 + 1;  // start, data, parity, stop

  // Even parity bit for a data byte.
  function automatic logic even_parity(logic [DATA_BITS-1:0] d);
    return ^d;
  endfunction

  // The whole frame, bit 0 first on the line.
  function automatic logic [FRAME_BITS-1:0] make_frame(logic [DATA_BITS-1:0] d);
    return {1'b1, even_parity(d), d, 1'b0};
  endfunction

endpackage
