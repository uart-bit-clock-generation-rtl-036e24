// tb_uart_wide: loopback test of the wider word formats, 16 and 32 data
// bits, using two uart_top instances with DATA_BITS overridden. Each word
// goes out with random parity settings, and the same word must come back on
// rxdata with parity_err clear, rdy set (DATA_BITS+1+parity)*16+9 clk16x
// edges after the load edge, and exactly one rdy per word.
module tb_uart_wide;

  logic clk16x = 1'b0;
  logic rst_n  = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk16x = ~clk16x;

  logic        pen16 = 1'b0, odd16 = 1'b0, load16 = 1'b0;
  logic [15:0] d16 = '0, rx16;
  logic        busy16, so16, rdy16, perr16, bc16;
  logic        pen32 = 1'b0, odd32 = 1'b0, load32 = 1'b0;
  logic [31:0] d32 = '0, rx32;
  logic        busy32, so32, rdy32, perr32, bc32;

  uart_top #(.DATA_BITS(16)) u16 (.clk16x, .rst_n, .parity_enb(pen16), .odd_parity(odd16),
    .load(load16), .tx_data(d16), .tx_busy(busy16), .serial_out(so16), .rxdata(rx16),
    .rdy(rdy16), .parity_err(perr16), .bit_clk(bc16));
  uart_top #(.DATA_BITS(32)) u32 (.clk16x, .rst_n, .parity_enb(pen32), .odd_parity(odd32),
    .load(load32), .tx_data(d32), .tx_busy(busy32), .serial_out(so32), .rxdata(rx32),
    .rdy(rdy32), .parity_err(perr32), .bit_clk(bc32));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // one word through the 16-bit or the 32-bit instance
  task automatic word(input bit wide, input logic [31:0] data, input logic pen,
                      input logic odd);
    int lat, n_rdy;
    @(negedge clk16x);
    if (wide) begin d32 = data; pen32 = pen; odd32 = odd; load32 = 1'b1; end
    else      begin d16 = data[15:0]; pen16 = pen; odd16 = odd; load16 = 1'b1; end
    @(negedge clk16x);
    load16 = 1'b0; load32 = 1'b0;
    lat = 1; n_rdy = 0;
    // count edges from the load edge until rdy has been seen and the line is idle
    repeat (((wide ? 32 : 16) + 3) * 16 + 30) begin
      @(posedge clk16x);
      #1;
      if (wide ? rdy32 : rdy16) begin
        n_rdy++;
        check(lat == ((wide ? 32 : 16) + 1 + int'(pen)) * 16 + 9, $sformatf("latency %0d", lat));
        if (wide) check(rx32 == data && !perr32, "32-bit word");
        else      check(rx16 == data[15:0] && !perr16, "16-bit word");
      end
      lat++;
    end
    check(n_rdy == 1, "one rdy per word");
  endtask

  initial begin
    repeat (3) @(negedge clk16x);
    rst_n = 1'b1;
    repeat (20) @(negedge clk16x);
    word(1'b0, 32'h0000_8001, 1'b1, 1'b0);
    word(1'b1, 32'h8000_0001, 1'b1, 1'b1);
    repeat (30) begin
      word(1'b0, $urandom, 1'($urandom), 1'($urandom));
      word(1'b1, $urandom, 1'($urandom), 1'($urandom));
    end
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

endmodule : tb_uart_wide
