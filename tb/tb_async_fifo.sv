// tb_async_fifo: self-checking test of the dual-clock FIFO.
//
// The write and read sides run on unrelated clocks (periods 10 ns and
// 17 ns, then swapped to 23 ns and 7 ns). A queue models the FIFO contents:
// every accepted write is pushed, every read is compared with the oldest
// entry. Phases: fill an idle FIFO until full and keep writing (extra
// writes must be dropped, full must come exactly at DEPTH words), drain it
// until empty (reads while empty must be ignored), then long runs of random
// writes and reads. On every edge it checks that the writer's level never
// underestimates and the reader's level never overestimates the true
// occupancy, that neither exceeds DEPTH, that the almost-full and
// almost-empty flags follow their thresholds, and that a word written into
// an empty FIFO becomes visible to the reader within the synchronizer
// latency.
module tb_async_fifo;
  localparam int DW = 8;
  localparam int DEPTH = 16;
  localparam int AW = $clog2(DEPTH);

  logic          wclk = 1'b0, rclk = 1'b0, rst_n = 1'b1;
  int            wper = 5, rper = 8;       // half periods
  logic          wr_en = 1'b0, rd_en = 1'b0;
  logic [DW-1:0] wr_data = '0, rd_data;
  logic [AW:0]   af_thresh = (AW+1)'(12), ae_thresh = (AW+1)'(3);
  logic          full, almost_full, empty, almost_empty;
  logic [AW:0]   wr_level, rd_level;
  int            checks = 0, failures = 0;
  logic [DW-1:0] sb[$];
  int            n_full = 0, n_empty = 0, n_af = 0, n_ae = 0, n_drop = 0;

  async_fifo dut (
    .wclk (wclk), .wrst_n (rst_n), .wr_en (wr_en), .wr_data (wr_data),
    .af_thresh (af_thresh), .full (full), .almost_full (almost_full),
    .wr_level (wr_level),
    .rclk (rclk), .rrst_n (rst_n), .rd_en (rd_en), .rd_data (rd_data),
    .ae_thresh (ae_thresh), .empty (empty), .almost_empty (almost_empty),
    .rd_level (rd_level)
  );

  // A reset edge at time 1 so the asynchronous resets take effect.
  initial #1 rst_n = 1'b0;

  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Scoreboard updates on the active edges.
  always @(posedge wclk) if (rst_n) begin
    if (wr_en && !full) sb.push_back(wr_data);
    if (wr_en && full) n_drop++;
  end
  always @(posedge rclk) if (rst_n) begin
    if (rd_en && !empty) begin
      if (sb.size() == 0) check(0, "read data that was never written");
      else begin
        logic [DW-1:0] e;
        e = sb.pop_front();
        check(rd_data == e, $sformatf("read %h expected %h", rd_data, e));
      end
    end
  end

  // Flag checks between edges.
  always @(negedge wclk) if (rst_n) begin
    check(int'(wr_level) >= sb.size() && int'(wr_level) <= DEPTH,
          $sformatf("write level %0d, true %0d", wr_level, sb.size()));
    check(full == (int'(wr_level) == DEPTH), "full flag");
    check(almost_full == (wr_level >= af_thresh), "almost_full flag");
    if (full) n_full++;
    if (almost_full) n_af++;
  end
  always @(negedge rclk) if (rst_n) begin
    check(int'(rd_level) <= sb.size(),
          $sformatf("read level %0d, true %0d", rd_level, sb.size()));
    check(empty == (rd_level == 0), "empty flag");
    check(almost_empty == (rd_level <= ae_thresh), "almost_empty flag");
    if (empty) n_empty++;
    if (almost_empty) n_ae++;
  end

  task automatic write_words(input int n, input bit ignore_full);
    for (int i = 0; i < n; i++) begin
      @(negedge wclk);
      if (!ignore_full) while (full) @(negedge wclk);
      wr_en   = 1'b1;
      wr_data = DW'($urandom);
    end
    @(negedge wclk);
    wr_en = 1'b0;
  endtask

  task automatic random_traffic(input int cycles, input int wpct, input int rpct);
    fork
      for (int i = 0; i < cycles; i++) begin
        @(negedge wclk);
        wr_en   = ($urandom_range(99) < wpct);
        wr_data = DW'($urandom);
      end
      for (int i = 0; i < cycles; i++) begin
        @(negedge rclk);
        rd_en = ($urandom_range(99) < rpct);
      end
    join
    @(negedge wclk) wr_en = 1'b0;
    @(negedge rclk) rd_en = 1'b0;
  endtask

  task automatic drain();
    @(negedge rclk);
    rd_en = 1'b1;
    while (sb.size() != 0) @(negedge rclk);
    rd_en = 1'b1;                  // keep reading while empty: ignored
    repeat (5) @(negedge rclk);
    rd_en = 1'b0;
  endtask

  initial begin
    int lat;
    repeat (4) @(posedge rclk);
    rst_n = 1'b1;
    repeat (4) @(posedge rclk);
    check(empty && almost_empty && !full && !almost_full, "flags after reset");

    // Latency: a single word must reach the reader within a few rclk cycles.
    write_words(1, 1'b0);
    lat = 0;
    while (empty && lat < 20) begin
      @(posedge rclk);
      lat++;
    end
    check(lat <= 4, $sformatf("write-to-not-empty latency %0d rclk cycles", lat));
    drain();

    // Fill with the reader idle, and try to overfill.
    write_words(DEPTH + 5, 1'b1);
    repeat (8) @(posedge wclk);
    check(full && sb.size() == DEPTH, $sformatf("full at %0d words", sb.size()));
    check(n_drop >= 5, "writes while full dropped");
    repeat (8) @(posedge rclk);
    check(int'(rd_level) == DEPTH && !almost_empty, "reader sees all words");
    drain();
    repeat (8) @(posedge wclk);
    check(wr_level == 0 && empty, "levels settle to zero");

    random_traffic(3000, 60, 50);
    drain();
    random_traffic(3000, 40, 70);
    drain();

    // swap the clock speeds: fast reader, slow writer, then back
    wper = 11; rper = 3;
    random_traffic(2000, 90, 30);
    drain();
    random_traffic(2000, 50, 50);
    drain();

    check(n_full > 0 && n_empty > 0 && n_af > 0 && n_ae > 0,
          $sformatf("flags seen: full %0d empty %0d af %0d ae %0d",
                    n_full, n_empty, n_af, n_ae));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
