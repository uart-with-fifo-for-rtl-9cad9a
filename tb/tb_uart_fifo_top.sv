// tb_uart_fifo_top: end-to-end test of the UART with FIFOs.
//
// The top runs at its default parameters (8-bit data, 16-word FIFOs, 16
// ticks per bit) with the UART core on a 100 MHz clock and the host side
// on an unrelated ~71 MHz clock, so every word crosses both dual-clock
// FIFOs. The serial output is looped back to the serial input, except in
// the error phase where the testbench drives rx itself. A host model writes
// words into the transmit FIFO (stalling while it is full) and reads the
// receive FIFO, checking every word and its error flags in order.
//
// Phases:
//   A  burst of 40 words, 8N1, fast divisor: the transmit FIFO fills,
//      the host stalls, frames go out back to back, the host reads along.
//   B  20 words with the host not reading: the receive FIFO fills, the
//      last 4 words are dropped with an overrun pulse each.
//   C  frame-format switches (8E1, 7O2, 5N1, 8E2) in loopback.
//   D  the testbench drives rx with a bad parity bit and a low stop bit:
//      the errors come out of the receive FIFO with their words.
//   E  115200 baud at 100 MHz (divisor 54): the bit time on tx must be
//      16 * 54 = 864 clock cycles, and the words must arrive intact.
// Each mechanism (transmit FIFO full and almost full/empty, host stall,
// back-to-back frames, receive FIFO full and almost full/empty, overrun,
// parity error, framing error, format switch) is counted and must occur.
module tb_uart_fifo_top;
  import uart_pkg::*;

  logic        clk = 1'b0, host_clk = 1'b0, rst = 1'b0;
  logic [15:0] divisor = 16'd2;
  uart_cfg_t   cfg;
  logic [4:0]  tx_af_thresh = 5'd12, tx_ae_thresh = 5'd2;
  logic [4:0]  rx_af_thresh = 5'd12, rx_ae_thresh = 5'd2;
  logic        tx_wr_en = 1'b0;
  logic [7:0]  tx_wr_data = '0;
  logic        tx_full, tx_almost_full;
  logic [4:0]  tx_level, rx_level;
  logic        rx_rd_en = 1'b0;
  logic [7:0]  rx_rd_data;
  logic        rx_parity_err, rx_frame_err, rx_empty, rx_almost_empty;
  logic        tx_empty, tx_almost_empty, tx_busy, tx_done;
  logic        rx_full, rx_almost_full, rx_overrun;
  logic        tx, rx;
  logic        loopback = 1'b1, drv_rx = 1'b1;

  int checks = 0, failures = 0;
  longint cyc = 0;

  typedef struct { logic [7:0] d; bit pe, fe; } exp_t;
  exp_t expq[$];

  // mechanism counters
  int n_txf_full = 0, n_txf_af = 0, n_txf_ae = 0, n_stall = 0, n_b2b = 0;
  int n_rxf_full = 0, n_rxf_af = 0, n_rxf_ae = 0, n_overrun = 0;
  int n_perr = 0, n_ferr = 0, n_switch = 0, n_rate = 0, n_read = 0;

  uart_fifo_top dut (
    .clk (clk), .host_clk (host_clk), .rst (rst),
    .divisor (divisor), .cfg (cfg),
    .tx_af_thresh (tx_af_thresh), .tx_ae_thresh (tx_ae_thresh),
    .rx_af_thresh (rx_af_thresh), .rx_ae_thresh (rx_ae_thresh),
    .tx_wr_en (tx_wr_en), .tx_wr_data (tx_wr_data),
    .tx_full (tx_full), .tx_almost_full (tx_almost_full), .tx_level (tx_level),
    .rx_rd_en (rx_rd_en), .rx_rd_data (rx_rd_data),
    .rx_parity_err (rx_parity_err), .rx_frame_err (rx_frame_err),
    .rx_empty (rx_empty), .rx_almost_empty (rx_almost_empty), .rx_level (rx_level),
    .tx_empty (tx_empty), .tx_almost_empty (tx_almost_empty),
    .tx_busy (tx_busy), .tx_done (tx_done),
    .rx_full (rx_full), .rx_almost_full (rx_almost_full), .rx_overrun (rx_overrun),
    .rx (rx), .tx (tx)
  );

  assign rx = loopback ? tx : drv_rx;

  // A reset edge at time 1 so the asynchronous resets take effect.
  initial #1 rst = 1'b1;

  always #5 clk = ~clk;            // 100 MHz UART core
  always #7 host_clk = ~host_clk;  // ~71 MHz host

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // ---------------- UART-side monitors ----------------
  bit     prev_done = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (tx_almost_empty && !tx_empty) n_txf_ae++;
      if (rx_full) n_rxf_full++;
      if (rx_almost_full) n_rxf_af++;
      if (rx_overrun) n_overrun++;
      // a frame that starts right after the previous one ended
      if (prev_done && tx_busy) n_b2b++;
      prev_done <= tx_done;
    end
  end

  // ---------------- host side ----------------
  bit auto_read = 1'b1;
  always @(posedge host_clk) begin
    if (!rst) begin
      if (tx_full) n_txf_full++;
      if (tx_almost_full) n_txf_af++;
      if (rx_almost_empty && !rx_empty) n_rxf_ae++;
      if (tx_wr_en && tx_full) n_stall++;
      if (rx_rd_en && !rx_empty) begin
        n_read++;
        if (expq.size() == 0) check(0, "unexpected received word");
        else begin
          exp_t e;
          e = expq.pop_front();
          check(rx_rd_data == e.d, $sformatf("rx data %h expected %h", rx_rd_data, e.d));
          check(rx_parity_err == e.pe && rx_frame_err == e.fe,
                $sformatf("rx flags pe=%0b fe=%0b expected %0b %0b word %h",
                          rx_parity_err, rx_frame_err, e.pe, e.fe, e.d));
          if (rx_parity_err) n_perr++;
          if (rx_frame_err) n_ferr++;
        end
      end
    end
  end
  always @(negedge host_clk) rx_rd_en <= auto_read && !rx_empty;

  // Write one word, holding it while the transmit FIFO is full.
  task automatic host_write(input logic [7:0] w);
    exp_t e;
    @(negedge host_clk);
    tx_wr_en   = 1'b1;
    tx_wr_data = w;
    @(posedge host_clk);
    while (tx_full) @(posedge host_clk);
    e.d  = w & 8'((1 << int'(cfg.data_bits)) - 1);
    e.pe = 1'b0;
    e.fe = 1'b0;
    expq.push_back(e);
    @(negedge host_clk);
    tx_wr_en = 1'b0;
  endtask

  task automatic wait_idle();
    int guard = 0;
    while ((expq.size() != 0 || !tx_empty || tx_busy) && guard < 400000) begin
      @(posedge clk);
      guard++;
    end
    repeat (200) @(posedge clk);
    check(expq.size() == 0, $sformatf("%0d words never received", expq.size()));
  endtask

  task automatic set_cfg(input int nbits, input parity_e par, input bit two);
    cfg.data_bits = NBITS_W'(nbits);
    cfg.parity    = par;
    cfg.two_stop  = two;
    n_switch++;
  endtask

  // Drive one frame on rx from the testbench, with optional errors.
  task automatic drive_frame(input logic [7:0] w, input bit bad_par, input bit bad_stop);
    int bitc = 16 * int'(divisor);
    bit p = (cfg.parity == PAR_ODD);
    int nb = int'(cfg.data_bits);
    exp_t e;
    for (int i = 0; i < nb; i++) p ^= w[i];
    e.d  = w & 8'((1 << nb) - 1);
    e.pe = bad_par && (cfg.parity != PAR_NONE);
    e.fe = bad_stop;
    expq.push_back(e);
    @(posedge clk) drv_rx <= 1'b0;
    repeat (bitc) @(posedge clk);
    for (int i = 0; i < nb; i++) begin
      drv_rx <= w[i];
      repeat (bitc) @(posedge clk);
    end
    if (cfg.parity != PAR_NONE) begin
      drv_rx <= p ^ bad_par;
      repeat (bitc) @(posedge clk);
    end
    drv_rx <= !bad_stop;
    repeat (bitc) @(posedge clk);
    drv_rx <= 1'b1;
    repeat (2 * bitc) @(posedge clk);
  endtask

  initial begin
    cfg = '{data_bits: NBITS_W'(8), parity: PAR_NONE, two_stop: 1'b0};
    repeat (5) @(posedge host_clk);
    rst = 1'b0;
    repeat (10) @(posedge host_clk);
    check(tx == 1'b1 && rx_empty && !tx_full && tx_empty, "idle after reset");

    // ---- A: burst with stalls, host reading along ----
    for (int i = 0; i < 40; i++) host_write(8'($urandom));
    wait_idle();

    // ---- B: receive FIFO overflow ----
    auto_read = 1'b0;
    for (int i = 0; i < 20; i++) host_write(8'(8'hA0 + i));
    begin
      int guard = 0;
      while ((!tx_empty || tx_busy) && guard < 400000) begin
        @(posedge clk);
        guard++;
      end
    end
    repeat (400) @(posedge clk);
    check(rx_full && int'(rx_level) == 16, $sformatf("rx FIFO full, level %0d", rx_level));
    check(n_overrun == 4, $sformatf("overrun pulses %0d, expected 4", n_overrun));
    // the 4 words that found the FIFO full are lost
    repeat (4) void'(expq.pop_back());
    auto_read = 1'b1;
    wait_idle();

    // ---- C: frame-format switches ----
    set_cfg(8, PAR_EVEN, 0);
    for (int i = 0; i < 6; i++) host_write(8'($urandom));
    wait_idle();
    set_cfg(7, PAR_ODD, 1);
    for (int i = 0; i < 6; i++) host_write(8'($urandom));
    wait_idle();
    set_cfg(5, PAR_NONE, 0);
    for (int i = 0; i < 6; i++) host_write(8'($urandom));
    wait_idle();
    set_cfg(8, PAR_EVEN, 1);
    for (int i = 0; i < 6; i++) host_write(8'($urandom));
    wait_idle();

    // ---- D: parity and framing errors from a foreign sender ----
    loopback = 1'b0;
    set_cfg(8, PAR_EVEN, 0);
    drive_frame(8'h3C, 1'b1, 1'b0);
    drive_frame(8'h5A, 1'b0, 1'b0);
    drive_frame(8'hC3, 1'b0, 1'b1);
    drive_frame(8'h99, 1'b1, 1'b1);
    wait_idle();
    loopback = 1'b1;

    // ---- E: 115200 baud at 100 MHz ----
    set_cfg(8, PAR_NONE, 0);
    divisor = 16'd54;
    repeat (100) @(posedge clk);
    host_write(8'h55);           // alternating bits: an edge every bit
    begin
      longint t_edge[$];
      logic   last;
      last = tx;
      while (t_edge.size() < 10) begin
        @(posedge clk);
        if (tx != last) t_edge.push_back(cyc);
        last = tx;
      end
      // start bit may be short by up to one tick; the rest are exact
      check(t_edge[1] - t_edge[0] <= 864 && t_edge[1] - t_edge[0] >= 864 - 54,
            $sformatf("start bit %0d cycles", t_edge[1] - t_edge[0]));
      for (int i = 2; i < 10; i++) begin
        check(t_edge[i] - t_edge[i-1] == 864,
              $sformatf("bit time %0d cycles, expected 864", t_edge[i] - t_edge[i-1]));
        n_rate++;
      end
    end
    for (int i = 0; i < 5; i++) host_write(8'($urandom));
    wait_idle();

    // ---- every mechanism must have happened ----
    check(n_txf_full > 0, "transmit FIFO full");
    check(n_txf_af > 0, "transmit FIFO almost full");
    check(n_txf_ae > 0, "transmit FIFO almost empty");
    check(n_stall > 0, "host stalled on full transmit FIFO");
    check(n_b2b > 0, "back-to-back frames");
    check(n_rxf_full > 0, "receive FIFO full");
    check(n_rxf_af > 0, "receive FIFO almost full");
    check(n_rxf_ae > 0, "receive FIFO almost empty");
    check(n_overrun > 0, "overrun");
    check(n_perr > 0, "parity error");
    check(n_ferr > 0, "framing error");
    check(n_switch > 0, "frame-format switch");
    check(n_rate > 0, "115200 baud bit time");
    $display("mechanisms: txf_full=%0d txf_af=%0d txf_ae=%0d stall=%0d b2b=%0d rxf_full=%0d rxf_af=%0d rxf_ae=%0d overrun=%0d perr=%0d ferr=%0d switch=%0d words_read=%0d",
             n_txf_full, n_txf_af, n_txf_ae, n_stall, n_b2b, n_rxf_full, n_rxf_af,
             n_rxf_ae, n_overrun, n_perr, n_ferr, n_switch, n_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
