// tb_uart_rx: self-checking testbench for uart_rx.
//
// A serial line model here sends frames at exactly 16 clk16x per bit with
// random data, parity off, even or odd, random idle gaps (zero included)
// and random start phases, sometimes with a deliberately wrong parity bit.
// Each frame must produce exactly one rdy pulse with the sent word on
// rxdata and parity_err set only for a wrong parity bit. The pulse must
// come (DATA_BITS+1+parity)*16+8 edges after the edge that first sees the
// START bit low. A reset in the middle of a frame must drop that frame.
module tb_uart_rx;

  localparam int D = 8;
  localparam longint DL = D;

  logic         clk16x = 1'b0;
  logic         rst_n  = 1'b0;
  logic         rxd    = 1'b1;
  logic         parity_enb = 1'b0, odd_parity = 1'b0;
  logic [D-1:0] rxdata;
  logic         rdy, parity_err, bit_clk;

  int checks = 0, failures = 0;
  int n_frames = 0, n_par = 0, n_odd = 0, n_perr = 0, n_rdy = 0;
  longint edge_no = 0, rdy_edge = 0;

  uart_rx #(.DATA_BITS(D)) dut (.clk16x, .rst_n, .rxd, .parity_enb, .odd_parity,
                                .rxdata, .rdy, .parity_err, .bit_clk);

  always #5 clk16x = ~clk16x;
  always @(posedge clk16x) begin
    edge_no <= edge_no + 1;
    if (rdy) begin
      n_rdy++;
      rdy_edge = edge_no;   // edge count at which rdy was set
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  task automatic line(input logic b, input int len);
    repeat (len) begin
      @(negedge clk16x);
      rxd = b;
    end
  endtask

  task automatic frame(input logic [D-1:0] data, input logic pen, input logic odd,
                       input logic bad_par);
    longint start_edge;
    int     nrdy0;
    logic   p;
    p = (^data) ^ odd ^ bad_par;
    @(negedge clk16x);
    parity_enb = pen; odd_parity = odd;
    nrdy0 = n_rdy;
    rxd = 1'b0;
    start_edge = edge_no + 1;                    // edge that first sees the 0
    line(1'b0, 15);
    for (int i = 0; i < D; i++) line(data[i], 16);
    if (pen) line(p, 16);
    line(1'b1, 16);
    line(1'b1, 1);
    check(n_rdy == nrdy0 + 1, "exactly one rdy per frame");
    check(rxdata == data, $sformatf("rxdata %h expected %h", rxdata, data));
    check(parity_err == (pen && bad_par), "parity_err");
    check(rdy_edge - start_edge == (DL + 1 + longint'(pen)) * 16 + 8,
          $sformatf("latency %0d", rdy_edge - start_edge));
    n_frames++;
    if (pen) n_par++;
    if (pen && odd) n_odd++;
    if (pen && bad_par) n_perr++;
  endtask

  initial begin
    line(1'b1, 4);
    rst_n = 1'b1;
    line(1'b1, 37);
    frame(8'h55, 1'b1, 1'b0, 1'b0);
    frame(8'h00, 1'b1, 1'b1, 1'b0);
    frame(8'hFF, 1'b0, 1'b0, 1'b0);
    frame(8'h80, 1'b1, 1'b0, 1'b1);
    repeat (80) begin
      logic pen;
      pen = 1'($urandom);
      frame(D'($urandom), pen, 1'($urandom), pen && ($urandom_range(0, 3) == 0));
      line(1'b1, $urandom_range(0, 37));
    end
    // reset in the middle of a frame: no rdy for it, next frame fine
    begin
      int nrdy0;
      nrdy0 = n_rdy;
      line(1'b0, 16);
      line(1'b1, 40);
      @(negedge clk16x) rst_n = 1'b0;
      line(1'b1, 3);
      rst_n = 1'b1;
      line(1'b1, 200);
      check(n_rdy == nrdy0, "no rdy for a frame cut by reset");
      check(rxdata == '0 && !parity_err, "outputs cleared by reset");
    end
    frame(8'h3C, 1'b1, 1'b1, 1'b0);
    checks++;
    if (n_par == 0 || n_odd == 0 || n_perr == 0 || n_par == n_frames) begin
      failures++;
      $display("FAIL: a mode was never exercised");
    end
    $display("frames=%0d parity=%0d odd=%0d parity_errors=%0d", n_frames, n_par, n_odd, n_perr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk16x);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_uart_rx
