// uart_pkg: constants and helpers shared by the UART transmitter, the
// receiver and the bit-clock generator.
//
// A frame is a START bit (0), the data word LSB first, an optional parity
// bit and a STOP bit (1); the line idles at 1. All timing is counted in
// periods of clk16x, a clock sixteen times the bit rate. The frame format,
// the 16x clock and the 8-bit default word follow the source description;
// the parity convention (even parity makes the count of ones in data plus
// parity even) is this design's reading of the odd_parity flag.
package uart_pkg;

  localparam logic START_BIT = 1'b0;
  localparam logic STOP_BIT  = 1'b1;
  localparam logic IDLE_LVL  = 1'b1;

  // clk16x periods per bit and the bit-clock high time after a (re)start
  // (the "##7" of the bit-clock sequence); the low phase then lasts the rest.
  localparam int unsigned OVERSAMPLE_DEF  = 16;
  localparam int unsigned HIGH_CYCLES_DEF = 7;

  // Widest word the frame format allows (8, 16 or 32 data bits).
  localparam int unsigned MAX_DATA_BITS = 32;

  // Parity bit for a word zero-extended to MAX_DATA_BITS. Zero padding
  // does not change the XOR, so narrower words pass through unchanged.
  function automatic logic parity_bit(input logic [MAX_DATA_BITS-1:0] data,
                                      input logic                     odd);
    return (^data) ^ odd;
  endfunction

endpackage : uart_pkg
