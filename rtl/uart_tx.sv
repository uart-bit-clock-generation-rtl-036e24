// uart_tx: UART transmitter.
//
// The host presents a word on tx_data and pulses load while tx_busy is low.
// The transmitter builds the frame START(0), data LSB first, parity (when
// parity_enb is 1) and STOP(1) in a shift register and sends one bit every
// OVERSAMPLE periods of clk16x; the START bit goes out on the clk16x edge
// that takes load. serial_out comes straight from a flip-flop and idles at 1.
// tx_busy rises on that same edge and falls on the edge that ends the STOP
// bit, so it is high for exactly one frame time. A load held high then
// starts the next frame one clk16x later (back-to-back frames).
// A load while tx_busy is high is ignored. parity_enb and odd_parity are
// taken at load. A frame lasts (DATA_BITS+2+parity_enb)*OVERSAMPLE cycles.
//
// The frame format, bit order, 16x clock and 8-bit default follow the
// source description. The load/busy handshake, the ignored load while busy,
// the synchronous active-low reset and the parity convention (see uart_pkg)
// are this design's choices.
module uart_tx
  import uart_pkg::*;
#(
  parameter int unsigned DATA_BITS  = 8,
  parameter int unsigned OVERSAMPLE = uart_pkg::OVERSAMPLE_DEF
) (
  input  logic                 clk16x,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [DATA_BITS-1:0] tx_data,
  input  logic                 parity_enb,
  input  logic                 odd_parity,
  output logic                 tx_busy,
  output logic                 serial_out
);

  localparam int unsigned FRAME_BITS = DATA_BITS + 3;  // start, data, parity, stop
  localparam int unsigned CW = $clog2(OVERSAMPLE);
  localparam int unsigned BW = $clog2(FRAME_BITS + 1);

  logic [FRAME_BITS-1:0] shreg;      // bit 0 is on the line
  logic [CW-1:0]         cnt16;      // clk16x periods into the current bit
  logic [BW-1:0]         bits_left;  // bits of the frame not yet finished
  logic                  par;

  assign par = parity_bit(MAX_DATA_BITS'(tx_data), odd_parity);

  always_ff @(posedge clk16x) begin
    if (!rst_n) begin
      shreg     <= '1;
      cnt16     <= '0;
      bits_left <= '0;
      tx_busy   <= 1'b0;
    end else if (!tx_busy) begin
      if (load) begin
        // without parity the STOP bit takes the parity slot
        shreg     <= {STOP_BIT, parity_enb ? par : STOP_BIT, tx_data, START_BIT};
        cnt16     <= '0;
        bits_left <= parity_enb ? BW'(FRAME_BITS) : BW'(FRAME_BITS - 1);
        tx_busy   <= 1'b1;
      end
    end else begin
      cnt16 <= cnt16 + 1'b1;
      if (cnt16 == CW'(OVERSAMPLE - 1)) begin
        cnt16     <= '0;
        shreg     <= {IDLE_LVL, shreg[FRAME_BITS-1:1]};
        bits_left <= bits_left - 1'b1;
        if (bits_left == BW'(1)) tx_busy <= 1'b0;
      end
    end
  end

  assign serial_out = shreg[0];

endmodule : uart_tx
