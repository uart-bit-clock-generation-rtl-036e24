// tb_uart_tx: self-checking testbench for uart_tx.
//
// Loads random words with parity off, even and odd, with random gaps and
// back-to-back (load held high), and tries a load while busy, which must
// be ignored. For every accepted load the expected line is built here bit
// by bit (START 0, data LSB first, parity when enabled, STOP 1) and
// compared with serial_out on every clk16x edge of the frame; tx_busy must
// be high for exactly (DATA_BITS+2+parity)*16 edges, and the line must be
// idle (1) whenever tx_busy is low.
module tb_uart_tx;

  localparam int D = 8;

  logic         clk16x = 1'b0;
  logic         rst_n  = 1'b0;
  logic         load   = 1'b0;
  logic [D-1:0] tx_data = '0;
  logic         parity_enb = 1'b0, odd_parity = 1'b0;
  logic         tx_busy, serial_out;

  int checks = 0, failures = 0;
  int n_frames = 0, n_par = 0, n_odd = 0, n_b2b = 0, n_ignored = 0;

  uart_tx #(.DATA_BITS(D)) dut (.clk16x, .rst_n, .load, .tx_data, .parity_enb,
                                .odd_parity, .tx_busy, .serial_out);

  always #5 clk16x = ~clk16x;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // load one word and check the whole frame; try_busy_load also gives a
  // second load in the middle of the frame, which must change nothing
  task automatic frame(input logic [D-1:0] data, input logic pen, input logic odd,
                       input bit try_busy_load);
    int nbits;
    logic bits [0:D+2];
    bits[0] = 1'b0;
    for (int i = 0; i < D; i++) bits[1+i] = data[i];
    bits[D+1] = pen ? ((^data) ^ odd) : 1'b1;
    bits[D+2] = 1'b1;
    nbits = pen ? D + 3 : D + 2;
    @(negedge clk16x);
    check(!tx_busy, "busy before load");
    tx_data = data; parity_enb = pen; odd_parity = odd; load = 1'b1;
    for (int k = 0; k < nbits * 16; k++) begin
      @(posedge clk16x); #1;
      check(tx_busy, $sformatf("tx_busy at cycle %0d", k));
      check(serial_out == bits[k / 16], $sformatf("serial_out bit %0d", k / 16));
      @(negedge clk16x);
      load = 1'b0;
      if (try_busy_load && k == 40) begin
        // a load while busy, with different settings, must be ignored
        load = 1'b1; tx_data = ~data; parity_enb = ~pen; n_ignored++;
      end
    end
    @(posedge clk16x); #1;
    check(!tx_busy, "tx_busy after frame");
    check(serial_out == 1'b1, "line idle after frame");
    n_frames++;
    if (pen) n_par++;
    if (pen && odd) n_odd++;
  endtask

  initial begin
    repeat (3) @(posedge clk16x);
    #1 check(serial_out == 1'b1 && !tx_busy, "idle in reset");
    rst_n = 1'b1;
    repeat (5) @(posedge clk16x);
    frame(8'hA5, 1'b1, 1'b0, 1'b0);
    frame(8'h00, 1'b1, 1'b1, 1'b0);
    frame(8'hFF, 1'b0, 1'b0, 1'b1);
    repeat (60) begin
      logic pen, odd;
      pen = 1'($urandom); odd = 1'($urandom);
      frame(D'($urandom), pen, odd, ($urandom_range(0, 3) == 0));
      if ($urandom_range(0, 1) == 0) n_b2b++;       // next load at once
      else repeat ($urandom_range(1, 30)) begin
        @(posedge clk16x); #1;
        check(serial_out == 1'b1 && !tx_busy, "idle between frames");
      end
    end
    checks++;
    if (n_par == 0 || n_odd == 0 || n_par == n_frames || n_b2b == 0 || n_ignored == 0) begin
      failures++;
      $display("FAIL: a mode was never exercised");
    end
    $display("frames=%0d parity=%0d odd=%0d back_to_back=%0d ignored_loads=%0d",
             n_frames, n_par, n_odd, n_b2b, n_ignored);
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

endmodule : tb_uart_tx
