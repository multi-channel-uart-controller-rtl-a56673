// Shared constants and helper functions of the multi-channel UART controller.
//
// A character is 7 bits wide. On the line it travels as a 10-bit frame:
// start bit (0), the 7 data bits LSB first, an even-parity bit (XOR of the
// seven data bits) and a stop bit (1). The receiver holds the first nine of
// these bits (start, data, parity) in its 9-bit shift register. The FIFOs
// hold 16 characters and use 5-bit Gray-coded pointers (4 address bits plus
// one wrap bit). These sizes are the ones the design was specified with;
// the Gray conversion functions implement g_n = b_n, g_i = b_i ^ b_(i+1)
// and its inverse b_i = g_i ^ b_(i+1).
package uart_pkg;

  localparam int unsigned DATA_W  = 7;           // character width (TBR, RHR)
  localparam int unsigned FRAME_W = DATA_W + 3;  // TSR: start + data + parity + stop
  localparam int unsigned RSR_W   = DATA_W + 2;  // RSR: start + data + parity
  localparam int unsigned FIFO_AW = 4;           // 2^4 = 16 FIFO locations
  localparam int unsigned BAUD_DIV = 4;          // system clocks per bit

  typedef logic [DATA_W-1:0] char_t;

  // Even parity: XOR of all data bits.
  function automatic logic parity_of(input char_t d);
    return ^d;
  endfunction

endpackage
