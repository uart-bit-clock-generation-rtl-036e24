// uart_rx: UART receiver.
//
// Bit timing comes from bit_clk_gen, which divides clk16x by 16 and is
// re-phased by every falling edge of rxd, so its mid_bit strobe marks the
// centre of each bit (the eighth clk16x after the edge). On each strobe the
// receiver registers rxd:
//   RX_IDLE    waiting for a message: a 0 at mid-bit is a START bit,
//   RX_DATA    DATA_BITS data bits, LSB first, into the receive shift register,
//   RX_PARITY  the parity bit, when parity_enb is 1,
//   RX_STOP    the STOP bit; then the word is complete.
// On the clk16x edge that samples the STOP bit, rxdata and parity_err are
// updated and rdy is high for the one following clk16x cycle; both hold
// until the next word. parity_err is 0 when parity_enb is 0. The STOP bit's
// value is not checked. The START bit is confirmed at its centre, on the
// 8th clk16x edge after the first edge that samples it low; rdy is set on
// the edge (DATA_BITS+1+parity_enb)*16+8 edges after that first edge.
//
// rxd must be synchronous to clk16x (in this design it is the transmitter's
// serial_out); an asynchronous line needs a synchroniser in front.
// The oversampling, the resynchronisation on falling edges, the mid-bit
// sampling and the rdy/rxdata/parity_err outputs follow the source
// description; the state encoding, the pulse form of rdy, ignoring the STOP
// bit's value and the synchronous active-low reset are this design's choices.
module uart_rx
  import uart_pkg::*;
#(
  parameter int unsigned DATA_BITS  = 8,
  parameter int unsigned OVERSAMPLE = uart_pkg::OVERSAMPLE_DEF
) (
  input  logic                 clk16x,
  input  logic                 rst_n,
  input  logic                 rxd,
  input  logic                 parity_enb,
  input  logic                 odd_parity,
  output logic [DATA_BITS-1:0] rxdata,
  output logic                 rdy,
  output logic                 parity_err,
  output logic                 bit_clk
);

  typedef enum logic [1:0] {RX_IDLE, RX_DATA, RX_PARITY, RX_STOP} rx_state_e;

  localparam int unsigned IW = $clog2(DATA_BITS);

  rx_state_e            state;
  logic [DATA_BITS-1:0] shreg;     // receive shift register, filled from the MSB
  logic [IW-1:0]        bit_idx;
  logic                 par_rx;    // received parity bit
  logic                 mid_bit;

  bit_clk_gen #(.OVERSAMPLE(OVERSAMPLE)) u_bit_clk (
    .clk16x (clk16x),
    .rst_n  (rst_n),
    .rxd    (rxd),
    .bit_clk(bit_clk),
    .mid_bit(mid_bit)
  );

  always_ff @(posedge clk16x) begin
    if (!rst_n) begin
      state      <= RX_IDLE;
      shreg      <= '0;
      bit_idx    <= '0;
      par_rx     <= 1'b0;
      rxdata     <= '0;
      rdy        <= 1'b0;
      parity_err <= 1'b0;
    end else begin
      rdy <= 1'b0;
      if (mid_bit) begin
        unique case (state)
          RX_IDLE: begin
            if (rxd == START_BIT) begin
              state   <= RX_DATA;
              bit_idx <= '0;
            end
          end
          RX_DATA: begin
            shreg   <= {rxd, shreg[DATA_BITS-1:1]};
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == IW'(DATA_BITS - 1))
              state <= parity_enb ? RX_PARITY : RX_STOP;
          end
          RX_PARITY: begin
            par_rx <= rxd;
            state  <= RX_STOP;
          end
          RX_STOP: begin
            state      <= RX_IDLE;
            rxdata     <= shreg;
            rdy        <= 1'b1;
            parity_err <= parity_enb &&
                          (par_rx != parity_bit(MAX_DATA_BITS'(shreg), odd_parity));
          end
          default: state <= RX_IDLE;
        endcase
      end
    end
  end

endmodule : uart_rx
