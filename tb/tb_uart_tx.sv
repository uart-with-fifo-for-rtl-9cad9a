// tb_uart_tx: self-checking test of the UART transmitter.
//
// A queue stands in for the transmit FIFO (head word visible, removed on
// fifo_pop) and the baud tick comes from a counter in the testbench. An
// independent serial decoder watches txd: on each falling edge it waits
// half a bit, checks the start bit, samples the data bits LSB first, the
// parity bit and the stop bits at bit centres, and compares them with the
// words that were queued. Several frame formats are tried (8N1, 8E1, 8O2,
// 7E1, 5N2, 6O1). It also checks the frame length in clock cycles between
// back-to-back start edges ((1 + data + parity + stop) bits of OVERSAMPLE
// ticks each), that one done pulse is given per frame, and that busy is
// high throughout a frame.
module tb_uart_tx;
  import uart_pkg::*;
  localparam int DIV  = 4;
  localparam int OS   = 16;
  localparam int BITC = DIV * OS;      // clock cycles per bit

  logic       clk = 1'b0, rst_n = 1'b1;
  logic       tick;
  uart_cfg_t  cfg;
  logic       fifo_empty, fifo_pop, txd, busy, done;
  logic [7:0] fifo_data;
  int         checks = 0, failures = 0;
  int         tcount = 0;
  int         dones = 0;
  logic [7:0] txq[$];                  // model of the transmit FIFO
  logic [7:0] expq[$];                 // words the decoder should see

  uart_tx dut (.clk (clk), .rst_n (rst_n), .tick (tick), .cfg (cfg),
               .fifo_empty (fifo_empty), .fifo_data (fifo_data), .fifo_pop (fifo_pop),
               .txd (txd), .busy (busy), .done (done));

  // A reset edge at time 1 so the asynchronous resets take effect.
  initial #1 rst_n = 1'b0;

  always #5 clk = ~clk;

  // baud tick every DIV cycles
  always_ff @(posedge clk) begin
    tcount <= (tcount == DIV - 1) ? 0 : tcount + 1;
  end
  assign tick = (tcount == DIV - 1);

  assign fifo_empty = (txq.size() == 0);
  assign fifo_data  = fifo_empty ? 8'h00 : txq[0];
  // The pop is applied half a cycle later so the DUT sees the popped word
  // on the edge that pops it.
  logic   pop_seen = 1'b0;
  longint cyc = 0;
  always @(posedge clk) begin
    pop_seen <= fifo_pop;
    cyc      <= cyc + 1;
    if (done) dones++;
  end
  always @(negedge clk) begin
    if (pop_seen && txq.size() > 0) void'(txq.pop_front());
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Independent decoder.
  longint last_start = -1;
  int     frames_seen = 0;
  bit     measure_len = 0;
  int     exp_len;
  initial begin
    forever begin
      logic [7:0] w;
      bit         p;
      int         nb;
      @(negedge txd);
      if (measure_len && last_start >= 0) begin
        longint gap;
        gap = cyc - last_start;
        check(gap >= exp_len - DIV && gap <= exp_len + DIV + 2,
              $sformatf("frame period %0d cycles, expected %0d", gap, exp_len));
      end
      last_start = cyc;
      nb = int'(cfg.data_bits);
      repeat (BITC / 2) @(posedge clk);
      check(txd == 1'b0 && busy, "start bit low, busy high");
      w = '0; p = 1'b0;
      for (int i = 0; i < nb; i++) begin
        repeat (BITC) @(posedge clk);
        w[i] = txd;
        p ^= txd;
        check(busy, "busy during data");
      end
      if (cfg.parity != PAR_NONE) begin
        repeat (BITC) @(posedge clk);
        p ^= txd;
        check(p == (cfg.parity == PAR_ODD), $sformatf("parity of word %h", w));
      end
      repeat (BITC) @(posedge clk);
      check(txd == 1'b1, "stop bit 1 high");
      if (cfg.two_stop) begin
        repeat (BITC) @(posedge clk);
        check(txd == 1'b1, "stop bit 2 high");
      end
      if (expq.size() == 0) check(0, "unexpected frame");
      else begin
        logic [7:0] e, mask;
        e    = expq.pop_front();
        mask = 8'((1 << nb) - 1);
        check(w == (e & mask), $sformatf("data got %h expected %h", w, e & mask));
      end
      frames_seen++;
    end
  end

  task automatic run_batch(input int nbits, input parity_e par, input bit two, input int n);
    int d0 = dones;
    int f0 = frames_seen;
    cfg.data_bits = NBITS_W'(nbits);
    cfg.parity    = par;
    cfg.two_stop  = two;
    exp_len = (1 + nbits + (par != PAR_NONE) + 1 + two) * BITC;
    last_start = -1;
    measure_len = 1;
    for (int i = 0; i < n; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      if (i == 0) v = 8'h55;
      if (i == 1) v = 8'hAA;
      txq.push_back(v);
      expq.push_back(v);
    end
    wait (txq.size() == 0);
    wait (!busy);
    repeat (BITC) @(posedge clk);
    check(frames_seen - f0 == n, $sformatf("frames decoded %0d of %0d", frames_seen - f0, n));
    check(dones - d0 == n, $sformatf("done pulses %0d of %0d", dones - d0, n));
    check(txd == 1'b1 && !busy, "idle line high, not busy");
  endtask

  initial begin
    cfg = '{data_bits: NBITS_W'(8), parity: PAR_NONE, two_stop: 1'b0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    check(txd == 1'b1 && !busy, "idle after reset");
    run_batch(8, PAR_NONE, 0, 6);
    run_batch(8, PAR_EVEN, 0, 6);
    run_batch(8, PAR_ODD,  1, 6);
    run_batch(7, PAR_EVEN, 0, 5);
    run_batch(5, PAR_NONE, 1, 5);
    run_batch(6, PAR_ODD,  0, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
