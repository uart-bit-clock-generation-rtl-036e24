// uart_top: UART transmitter looped back into the UART receiver.
//
// The transmitter's serial_out drives the receiver's rxd directly, so a word
// loaded on the transmit side reappears on rxdata with a one-cycle rdy
// pulse one frame later. Both halves run on clk16x, sixteen times the bit
// rate, share the synchronous active-low rst_n and the parity settings, and
// the serial line and the receiver's bit clock are brought out for
// observation. The host CPU that loads and reads words is outside this
// design: its signals are the ports load/tx_data/tx_busy and
// rxdata/rdy/parity_err.
//
// The loopback of serial_out into rxd follows the source description; the
// shared parity controls are this design's choice.
module uart_top
  import uart_pkg::*;
#(
  parameter int unsigned DATA_BITS  = 8,
  parameter int unsigned OVERSAMPLE = uart_pkg::OVERSAMPLE_DEF
) (
  input  logic                 clk16x,
  input  logic                 rst_n,
  input  logic                 parity_enb,
  input  logic                 odd_parity,
  // transmit side
  input  logic                 load,
  input  logic [DATA_BITS-1:0] tx_data,
  output logic                 tx_busy,
  output logic                 serial_out,
  // receive side
  output logic [DATA_BITS-1:0] rxdata,
  output logic                 rdy,
  output logic                 parity_err,
  output logic                 bit_clk
);

  uart_tx #(.DATA_BITS(DATA_BITS), .OVERSAMPLE(OVERSAMPLE)) u_tx (
    .clk16x    (clk16x),
    .rst_n     (rst_n),
    .load      (load),
    .tx_data   (tx_data),
    .parity_enb(parity_enb),
    .odd_parity(odd_parity),
    .tx_busy   (tx_busy),
    .serial_out(serial_out)
  );

  uart_rx #(.DATA_BITS(DATA_BITS), .OVERSAMPLE(OVERSAMPLE)) u_rx (
    .clk16x    (clk16x),
    .rst_n     (rst_n),
    .rxd       (serial_out),
    .parity_enb(parity_enb),
    .odd_parity(odd_parity),
    .rxdata    (rxdata),
    .rdy       (rdy),
    .parity_err(parity_err),
    .bit_clk   (bit_clk)
  );

endmodule : uart_top
