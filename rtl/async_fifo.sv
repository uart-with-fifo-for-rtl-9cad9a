// async_fifo: dual-clock FIFO with Gray-coded pointer synchronization.
//
// A dual-port memory of DEPTH words with a write pointer owned by the write
// clock domain and a read pointer owned by the read clock domain. Each
// pointer is one bit wider than the address so that a full FIFO can be told
// from an empty one. To cross into the other domain a pointer is kept in
// Gray code, where one increment changes a single bit, and passed through a
// SYNC_STAGES-flop synchronizer; the far side converts it back to binary.
//
// Write side (wclk): wr_en with wr_data stores a word unless full; a write
// while full is ignored. full, almost_full (wr_level >= af_thresh) and
// wr_level come from the local write pointer and the synchronized read
// pointer. Read side (rclk): the head word is shown on rd_data whenever
// empty is low (first-word fall-through); rd_en removes it. A read while
// empty is ignored. empty, almost_empty (rd_level <= ae_thresh) and rd_level
// come from the local read pointer and the synchronized write pointer.
// Because the far pointer arrives SYNC_STAGES+1 cycles late, each side's
// level is pessimistic: the writer may see the FIFO fuller and the reader
// emptier than it is, never the reverse, so no word is lost or read twice.
//
// Following the design: dual-port memory, separate read and write pointers,
// empty/full/almost-empty/almost-full flags, programmable almost thresholds,
// Gray-coded pointers with synchronizers for multi-clock operation, and a
// 16-word default depth. Own choices: first-word fall-through read, the
// threshold comparisons above, and DEPTH restricted to a power of two.
module async_fifo
  import uart_pkg::*;
#(
  parameter int unsigned DATA_W      = uart_pkg::DEF_DATA_W,
  parameter int unsigned DEPTH       = uart_pkg::DEF_FIFO_DEPTH,
  parameter int unsigned SYNC_STAGES = 2,
  localparam int unsigned AW         = $clog2(DEPTH)
) (
  // write clock domain
  input  logic              wclk,
  input  logic              wrst_n,
  input  logic              wr_en,
  input  logic [DATA_W-1:0] wr_data,
  input  logic [AW:0]       af_thresh,
  output logic              full,
  output logic              almost_full,
  output logic [AW:0]       wr_level,
  // read clock domain
  input  logic              rclk,
  input  logic              rrst_n,
  input  logic              rd_en,
  output logic [DATA_W-1:0] rd_data,
  input  logic [AW:0]       ae_thresh,
  output logic              empty,
  output logic              almost_empty,
  output logic [AW:0]       rd_level
);
  logic [DATA_W-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, wgray_s, wbin_s;   // write pointer; as seen by reader
  logic [AW:0] rbin, rgray, rgray_s, rbin_s;   // read pointer; as seen by writer
  logic [AW:0] wbin_nxt, rbin_nxt;
  logic        do_wr, do_rd;

  // ---------------- write domain ----------------
  assign do_wr    = wr_en && !full;
  assign wbin_nxt = wbin + (AW+1)'(1);

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wgray <= '0;
    end else if (do_wr) begin
      wbin  <= wbin_nxt;
      wgray <= (AW+1)'(bin2gray(32'(wbin_nxt)));
    end
  end

  always_ff @(posedge wclk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= wr_data;
  end

  sync_2ff #(.WIDTH(AW+1), .STAGES(SYNC_STAGES)) u_sync_rptr (
    .clk (wclk), .rst_n (wrst_n), .d (rgray), .q (rgray_s)
  );

  assign rbin_s      = (AW+1)'(gray2bin(32'(rgray_s)));
  assign wr_level    = wbin - rbin_s;
  assign full        = (wr_level == (AW+1)'(DEPTH));
  assign almost_full = (wr_level >= af_thresh);

  // ---------------- read domain ----------------
  assign do_rd    = rd_en && !empty;
  assign rbin_nxt = rbin + (AW+1)'(1);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
    end else if (do_rd) begin
      rbin  <= rbin_nxt;
      rgray <= (AW+1)'(bin2gray(32'(rbin_nxt)));
    end
  end

  sync_2ff #(.WIDTH(AW+1), .STAGES(SYNC_STAGES)) u_sync_wptr (
    .clk (rclk), .rst_n (rrst_n), .d (wgray), .q (wgray_s)
  );

  assign wbin_s       = (AW+1)'(gray2bin(32'(wgray_s)));
  assign rd_level     = wbin_s - rbin;
  assign empty        = (rd_level == '0);
  assign almost_empty = (rd_level <= ae_thresh);
  assign rd_data      = mem[rbin[AW-1:0]];

  // The level seen on either side can never exceed the depth.
  a_wr_level: assert property (@(posedge wclk) disable iff (!wrst_n)
                               wr_level <= (AW+1)'(DEPTH));
  a_rd_level: assert property (@(posedge rclk) disable iff (!rrst_n)
                               rd_level <= (AW+1)'(DEPTH));
endmodule
