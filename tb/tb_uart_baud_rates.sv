// tb_uart_baud_rates: the UART with FIFOs at the standard baud rates.
//
// With the UART core on a 100 MHz clock and 16 ticks per bit, the divisor
// for a baud rate B is round(100e6 / (16 * B)): 651 for 9600, 326 for
// 19200, 163 for 38400 and 54 for 115200 baud. For each rate the top (at
// its default parameters) sends a short burst in loopback: 0x55 first,
// whose alternating bits give an edge on tx every bit, then 0xAA, 0x00,
// 0xFF. It checks that each measured bit lasts 16 * divisor clock cycles,
// that the resulting baud rate is within 1% of the nominal one, and that
// every word comes back through the receive FIFO in order and without
// error flags.
module tb_uart_baud_rates;
  import uart_pkg::*;

  logic        clk = 1'b0, host_clk = 1'b0, rst = 1'b0;
  logic [15:0] divisor = 16'd54;
  uart_cfg_t   cfg;
  logic        tx_wr_en = 1'b0;
  logic [7:0]  tx_wr_data = '0;
  logic        tx_full, tx_almost_full;
  logic [4:0]  tx_level, rx_level;
  logic        rx_rd_en = 1'b0;
  logic [7:0]  rx_rd_data;
  logic        rx_parity_err, rx_frame_err, rx_empty, rx_almost_empty;
  logic        tx_empty, tx_almost_empty, tx_busy, tx_done;
  logic        rx_full, rx_almost_full, rx_overrun;
  logic        tx;
  int          checks = 0, failures = 0;
  longint      cyc = 0;
  logic [7:0]  expq[$];

  uart_fifo_top dut (
    .clk (clk), .host_clk (host_clk), .rst (rst),
    .divisor (divisor), .cfg (cfg),
    .tx_af_thresh (5'd12), .tx_ae_thresh (5'd2),
    .rx_af_thresh (5'd12), .rx_ae_thresh (5'd2),
    .tx_wr_en (tx_wr_en), .tx_wr_data (tx_wr_data),
    .tx_full (tx_full), .tx_almost_full (tx_almost_full), .tx_level (tx_level),
    .rx_rd_en (rx_rd_en), .rx_rd_data (rx_rd_data),
    .rx_parity_err (rx_parity_err), .rx_frame_err (rx_frame_err),
    .rx_empty (rx_empty), .rx_almost_empty (rx_almost_empty), .rx_level (rx_level),
    .tx_empty (tx_empty), .tx_almost_empty (tx_almost_empty),
    .tx_busy (tx_busy), .tx_done (tx_done),
    .rx_full (rx_full), .rx_almost_full (rx_almost_full), .rx_overrun (rx_overrun),
    .rx (tx), .tx (tx)
  );

  // A reset edge at time 1 so the asynchronous resets take effect.
  initial #1 rst = 1'b1;

  always #5 clk = ~clk;            // 100 MHz UART core
  always #6 host_clk = ~host_clk;  // ~83 MHz host

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // host reader
  always @(negedge host_clk) rx_rd_en <= !rx_empty;
  always @(posedge host_clk) begin
    if (!rst && rx_rd_en && !rx_empty) begin
      if (expq.size() == 0) check(0, "unexpected word");
      else begin
        logic [7:0] e;
        e = expq.pop_front();
        check(rx_rd_data == e && !rx_parity_err && !rx_frame_err,
              $sformatf("received %h pe=%0b fe=%0b expected %h",
                        rx_rd_data, rx_parity_err, rx_frame_err, e));
      end
    end
  end

  task automatic host_write(input logic [7:0] w);
    @(negedge host_clk);
    tx_wr_en   = 1'b1;
    tx_wr_data = w;
    @(posedge host_clk);
    while (tx_full) @(posedge host_clk);
    expq.push_back(w);
    @(negedge host_clk);
    tx_wr_en = 1'b0;
  endtask

  task automatic run_rate(input int baud);
    int     div;
    longint t_edge[$];
    logic   last;
    real    measured;
    div = (100_000_000 + 8 * baud) / (16 * baud);
    divisor = 16'(div);
    repeat (2 * div) @(posedge clk);
    fork
      begin
        host_write(8'h55);
        host_write(8'hAA);
        host_write(8'h00);
        host_write(8'hFF);
      end
      begin
        last = tx;
        while (t_edge.size() < 10) begin
          @(posedge clk);
          if (tx != last) t_edge.push_back(cyc);
          last = tx;
        end
      end
    join
    for (int i = 2; i < 10; i++)
      check(t_edge[i] - t_edge[i-1] == longint'(16 * div),
            $sformatf("%0d baud: bit of %0d cycles, expected %0d",
                      baud, t_edge[i] - t_edge[i-1], 16 * div));
    measured = 100.0e6 / real'(t_edge[9] - t_edge[2]) * 7.0;
    check(measured > 0.99 * baud && measured < 1.01 * baud,
          $sformatf("%0d baud: measured %f", baud, measured));
    $display("%0d baud: divisor %0d, measured %0.1f baud", baud, div, measured);
    begin
      int guard = 0;
      while (expq.size() != 0 && guard < 2_000_000) begin
        @(posedge clk);
        guard++;
      end
    end
    check(expq.size() == 0, $sformatf("%0d baud: %0d words missing", baud, expq.size()));
  endtask

  initial begin
    cfg = '{data_bits: NBITS_W'(8), parity: PAR_NONE, two_stop: 1'b0};
    repeat (5) @(posedge host_clk);
    rst = 1'b0;
    repeat (10) @(posedge host_clk);
    run_rate(115200);
    run_rate(38400);
    run_rate(19200);
    run_rate(9600);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
