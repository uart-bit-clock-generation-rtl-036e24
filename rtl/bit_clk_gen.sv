// bit_clk_gen: receive bit-clock generator synchronised to the serial line.
//
// Runs on clk16x. The bit clock is a 1/16 division of clk16x whose phase is
// re-aligned to every falling edge of rxd, so that the falling edge of
// bit_clk lands in the middle of each bit:
//   * A falling edge of rxd (seen at a clk16x edge) cancels any division in
//     progress. One clk16x later the registered copy rxd_r falls too, and
//     that starts a new bit period: bit_clk is set to 1 and restart cleared.
//   * HIGH_CYCLES (7) edges later bit_clk goes to 0: that is mid-bit, and
//     mid_bit is high during the clk16x cycle ending at that edge, so a user
//     registering rxd on clk16x when mid_bit is 1 samples the bit centre.
//   * OVERSAMPLE-HIGH_CYCLES-1 (8) edges after that bit_clk returns to 1 and
//     restart is set, which starts the next period on the following edge.
//     Bits that begin without a falling edge are thus still timed.
//   * While rst_n is low nothing runs and restart is set, so the bit clock
//     free-runs from reset and is re-phased by the first START bit.
// bit_clk is therefore 8 cycles high and 8 low in steady state.
//
// This is a register-level rendering of the two cover properties that the
// source uses to generate the bit clock (cp_bit_clk, cp_reset) and of the
// rxd_r register. The reset value of bit_clk (0) is this design's choice;
// rst_n is synchronous and active low, as in the source's receiver model.
//
// Ports: clk16x, rst_n, rxd (serial input, synchronous to clk16x);
// bit_clk (registered), mid_bit (combinational sample strobe).
module bit_clk_gen
  import uart_pkg::*;
#(
  parameter int unsigned OVERSAMPLE  = uart_pkg::OVERSAMPLE_DEF,
  parameter int unsigned HIGH_CYCLES = uart_pkg::HIGH_CYCLES_DEF
) (
  input  logic clk16x,
  input  logic rst_n,
  input  logic rxd,
  output logic bit_clk,
  output logic mid_bit
);

  localparam int unsigned CW = $clog2(OVERSAMPLE);
  localparam logic [CW-1:0] LOW_AT = CW'(HIGH_CYCLES - 1);
  localparam logic [CW-1:0] END_AT = CW'(OVERSAMPLE - 2);

  logic          rxd_r;     // rxd delayed by one clk16x
  logic          rxd_rr;    // rxd_r delayed by one clk16x
  logic          restart;   // start a new bit period on the next edge
  logic          active;    // a bit period is being counted
  logic [CW-1:0] cnt;       // clk16x edges since the period started, minus 1

  logic fell_rxd, fell_rxd_r, start;

  assign fell_rxd   = rxd_r  & ~rxd;
  assign fell_rxd_r = rxd_rr & ~rxd_r;
  assign start      = fell_rxd_r | restart;

  always_ff @(posedge clk16x) begin
    rxd_r  <= rxd;
    rxd_rr <= rxd_r;
  end

  always_ff @(posedge clk16x) begin
    if (!rst_n) begin
      restart <= 1'b1;
      active  <= 1'b0;
      cnt     <= '0;
      bit_clk <= 1'b0;
    end else if (fell_rxd) begin
      // resynchronise: drop the period in progress, keep bit_clk and restart
      active  <= 1'b0;
      cnt     <= '0;
    end else if (start) begin
      active  <= 1'b1;
      cnt     <= '0;
      bit_clk <= 1'b1;
      restart <= 1'b0;
    end else if (active) begin
      cnt <= cnt + 1'b1;
      if (cnt == LOW_AT) bit_clk <= 1'b0;
      if (cnt == END_AT) begin
        bit_clk <= 1'b1;
        restart <= 1'b1;
        active  <= 1'b0;
      end
    end
  end

  assign mid_bit = rst_n & active & ~fell_rxd & (cnt == LOW_AT);

  // An undisturbed period keeps bit_clk high from its start to mid-bit.
  a_high_until_mid : assert property (@(posedge clk16x) disable iff (!rst_n)
    mid_bit |-> bit_clk);

endmodule : bit_clk_gen
