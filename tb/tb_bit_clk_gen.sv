// tb_bit_clk_gen: self-checking testbench for bit_clk_gen.
//
// Drives rxd with UART-like bit streams (16 clk16x per bit, random data,
// random idle gaps), with stray falling edges at random phases, long runs
// without any edge, and a reset in the middle. A reference model that only
// remembers the clk16x edge at which the current bit period began (one edge
// after a falling edge of rxd is sampled, or the first edge out of reset)
// predicts bit_clk after every edge (high for phases 0..6 and 15, low for
// 7..14) and the mid_bit strobe (phase 6, unless rxd is falling).
// It counts resynchronisations and free-running (restart) periods and
// fails if either never happened.
module tb_bit_clk_gen;

  logic clk16x = 1'b0;
  logic rst_n  = 1'b0;
  logic rxd    = 1'b1;
  logic bit_clk, mid_bit;

  int checks = 0, failures = 0;
  int n_resync = 0, n_restart = 0;

  bit_clk_gen dut (.clk16x, .rst_n, .rxd, .bit_clk, .mid_bit);

  always #5 clk16x = ~clk16x;

  // reference model state
  longint edge_no = 0;
  longint t0 = 0;          // edge at which the current period began
  bit     have_t0 = 0;
  bit     want_start = 0;  // out of reset: the next edge begins a period
  bit     prev_rxd = 1'b1; // rxd sampled at the previous edge

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL edge %0d: %s", edge_no, what);
    end
  endtask

  // one clk16x period with the given inputs applied before the edge
  task automatic step(input logic r, input logic d);
    longint ph;
    @(negedge clk16x);
    // mid_bit reflects state after the last edge and the rxd about to be sampled
    rst_n = r;
    rxd   = d;
    #1;
    if (have_t0 && edge_no >= t0) begin
      ph = (edge_no - t0) % 16;
      check(mid_bit == (r && ph == 6 && !(prev_rxd && !d)), "mid_bit");
    end else begin
      check(mid_bit == 1'b0, "mid_bit outside a period");
    end
    @(posedge clk16x);
    edge_no++;
    #1;
    if (!r) begin
      have_t0 = 0;
      want_start = 1;
      check(bit_clk == 1'b0, "bit_clk in reset");
    end else if (prev_rxd && !d) begin
      t0 = edge_no + 1;
      have_t0 = 1;
      want_start = 0;
      n_resync++;
    end else begin
      if (want_start) begin
        t0 = edge_no;
        have_t0 = 1;
        want_start = 0;
      end
      if (have_t0 && edge_no >= t0) begin
        ph = (edge_no - t0) % 16;
        if (ph == 0 && edge_no > t0 + 15) n_restart++;
        check(bit_clk == (ph < 7 || ph == 15), $sformatf("bit_clk phase %0d", ph));
      end
    end
    prev_rxd = d;
  endtask

  task automatic send_bit(input logic b, input int len);
    repeat (len) step(1'b1, b);
  endtask

  task automatic send_frame(input logic [7:0] data);
    send_bit(1'b0, 16);
    for (int i = 0; i < 8; i++) send_bit(data[i], 16);
    send_bit(^data, 16);
    send_bit(1'b1, 16);
  endtask

  initial begin
    repeat (4) step(1'b0, 1'b1);
    send_bit(1'b1, 70);                       // free-running from reset
    repeat (40) begin
      send_frame(8'($urandom));
      send_bit(1'b1, $urandom_range(0, 40));
    end
    // stray edges at random phases
    repeat (40) begin
      send_bit(1'b0, $urandom_range(1, 20));
      send_bit(1'b1, $urandom_range(1, 40));
    end
    send_bit(1'b0, 100);                      // long low run: no edges
    send_bit(1'b1, 3);
    send_frame(8'h00);
    send_frame(8'hff);
    repeat (3) step(1'b0, 1'b0);              // reset in the middle
    send_frame(8'h5a);
    send_bit(1'b1, 40);
    checks++;
    if (n_resync == 0 || n_restart == 0) begin
      failures++;
      $display("FAIL: resync=%0d restart=%0d", n_resync, n_restart);
    end
    $display("resyncs=%0d restart periods=%0d", n_resync, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk16x);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_bit_clk_gen
