// tb_uart_top: end-to-end testbench for uart_top at its default parameters.
//
// A host model loads random words into the transmitter with parity off,
// even and odd, with random gaps or back-to-back. A scoreboard takes each
// accepted load (word, parity settings, clk16x edge) and expects exactly
// one rdy pulse for it, in order, with the same word on rxdata, no parity
// error, and rdy set (DATA_BITS+1+parity)*16+9 edges after the load edge.
// Parity errors are provoked by flipping odd_parity in the middle of some
// frames (the transmitter took the old value at load, the receiver checks
// with the new one), and one frame is cut by a reset, after which it must
// not be delivered and later frames must be. Counted and required at least
// once each: frames with no/even/odd parity, back-to-back frames, parity
// errors, resynchronisation on a falling edge inside a frame, bit periods
// started by restart (no falling edge), and the mid-frame reset.
module tb_uart_top;

  localparam int D = 8;   // uart_top default
  localparam longint DL = D;

  logic         clk16x = 1'b0;
  logic         rst_n  = 1'b0;
  logic         parity_enb = 1'b0, odd_parity = 1'b0;
  logic         load = 1'b0;
  logic [D-1:0] tx_data = '0;
  logic         tx_busy, serial_out, rdy, parity_err, bit_clk;
  logic [D-1:0] rxdata;

  uart_top dut (.clk16x, .rst_n, .parity_enb, .odd_parity, .load, .tx_data,
                .tx_busy, .serial_out, .rxdata, .rdy, .parity_err, .bit_clk);

  typedef struct {
    logic [D-1:0] data;
    logic         pen;
    logic         perr;
    longint       load_edge;
  } exp_t;

  exp_t   sb[$];
  int     checks = 0, failures = 0;
  int     n_loads = 0, n_rdy = 0;
  int     n_nopar = 0, n_even = 0, n_odd = 0, n_perr = 0, n_b2b = 0;
  int     n_resync = 0, n_restart = 0, n_reset = 0;
  longint edge_no = 0;
  logic   so_d1 = 1'b1, so_d2 = 1'b1, bc_d = 1'b0, busy_d = 1'b0;

  always #5 clk16x = ~clk16x;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL edge %0d: %s", edge_no, what);
    end
  endtask

  // scoreboard and mechanism counters, sampled on every clk16x edge
  always @(posedge clk16x) begin
    edge_no <= edge_no + 1;
    if (rst_n) begin
      // a falling edge after the START bit: a data or parity bit
      if (so_d1 && !serial_out && tx_busy && busy_d) n_resync++;
      if (bit_clk && !bc_d && !(so_d2 && !so_d1)) n_restart++;
    end
    so_d2 <= so_d1;
    so_d1 <= serial_out;
    bc_d  <= bit_clk;
    busy_d <= tx_busy;
    if (rdy && edge_no > 0) begin   // before the first edge rdy is not yet reset
      n_rdy++;
      if (sb.size() == 0) begin
        check(1'b0, "rdy with nothing sent");
      end else begin
        exp_t e;
        e = sb.pop_front();
        check(rxdata == e.data, $sformatf("rxdata %h expected %h", rxdata, e.data));
        check(parity_err == e.perr, "parity_err");
        // rdy is seen one edge after the edge that set it
        check(edge_no - 1 - e.load_edge == (DL + 1 + longint'(e.pen)) * 16 + 9,
              $sformatf("latency %0d", edge_no - 1 - e.load_edge));
      end
    end
  end

  task automatic send(input logic [D-1:0] data, input logic pen, input logic odd,
                      input bit flip_parity, input bit b2b);
    exp_t e;
    @(negedge clk16x);
    while (tx_busy) @(negedge clk16x);
    tx_data = data; parity_enb = pen; odd_parity = odd; load = 1'b1;
    @(posedge clk16x);
    e.data = data; e.pen = pen; e.perr = pen && flip_parity; e.load_edge = edge_no;
    sb.push_back(e);
    n_loads++;
    if (!pen) n_nopar++; else if (odd) n_odd++; else n_even++;
    if (e.perr) n_perr++;
    if (b2b) n_b2b++;
    @(negedge clk16x);
    load = 1'b0;
    if (flip_parity) begin
      repeat (90) @(negedge clk16x);
      odd_parity = ~odd_parity;
    end
    if (!b2b) begin
      while (tx_busy) @(negedge clk16x);
      repeat ($urandom_range(1, 50)) @(negedge clk16x);
    end
  endtask

  initial begin
    repeat (4) @(negedge clk16x);
    rst_n = 1'b1;
    repeat (20) @(negedge clk16x);
    send(8'h55, 1'b0, 1'b0, 1'b0, 1'b0);
    send(8'hA3, 1'b1, 1'b0, 1'b0, 1'b1);
    send(8'h0F, 1'b1, 1'b1, 1'b0, 1'b1);
    send(8'hF0, 1'b1, 1'b0, 1'b1, 1'b0);
    repeat (200) begin
      logic pen;
      pen = 1'($urandom);
      send(D'($urandom), pen, 1'($urandom), pen && ($urandom_range(0, 5) == 0),
           1'($urandom));
    end
    while (tx_busy) @(negedge clk16x);
    repeat (40) @(negedge clk16x);
    check(sb.size() == 0, "all frames delivered");
    // reset in the middle of a frame
    send(8'hC3, 1'b1, 1'b0, 1'b0, 1'b1);
    repeat (70) @(negedge clk16x);
    rst_n = 1'b0;
    sb.delete();
    n_reset++;
    repeat (3) @(negedge clk16x);
    check(!tx_busy && serial_out, "transmitter idle in reset");
    rst_n = 1'b1;
    repeat (200) @(negedge clk16x);
    check(sb.size() == 0 && !rdy, "frame cut by reset not delivered");
    send(8'h96, 1'b1, 1'b1, 1'b0, 1'b0);
    send(8'h69, 1'b0, 1'b0, 1'b0, 1'b0);
    repeat (40) @(negedge clk16x);
    check(sb.size() == 0, "frames after reset delivered");
    checks++;
    if (n_nopar == 0 || n_even == 0 || n_odd == 0 || n_perr == 0 || n_b2b == 0 ||
        n_resync == 0 || n_restart == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("loads=%0d rdy=%0d no_parity=%0d even=%0d odd=%0d parity_errors=%0d",
             n_loads, n_rdy, n_nopar, n_even, n_odd, n_perr);
    $display("back_to_back=%0d resyncs=%0d restart_periods=%0d resets=%0d",
             n_b2b, n_resync, n_restart, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk16x);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_uart_top
