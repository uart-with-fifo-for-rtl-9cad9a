// uart_fifo_top: UART with a transmit FIFO and a receive FIFO.
//
// A plain UART makes the host handle every byte the moment it arrives or
// is due to be sent; a late host loses received bytes (overrun) and leaves
// the line idle between transmitted ones. Here a FIFO sits on each side of
// the UART so the host can write and read in bursts at its own pace:
//
//   host_clk domain            |            clk domain (UART core)
//   tx_wr_en/tx_wr_data -> [ TX FIFO ] -> uart_tx -> tx
//   rx_rd_en/rx_rd_data <- [ RX FIFO ] <- uart_rx <- rx
//                                   baud_gen -> tick -> uart_tx, uart_rx
//
// The host side and the UART core run on separate clocks (they may be the
// same clock); the FIFOs are dual-clock with Gray-coded pointers. Each
// receive-FIFO entry holds the data word plus its parity and framing error
// flags, which appear on rx_parity_err / rx_frame_err next to rx_rd_data.
// If a word is received while the receive FIFO is full it is dropped and
// rx_overrun pulses for one clk cycle.
//
// Run-time settings (hold them steady while a frame is in flight):
// divisor (clk cycles per baud tick; a bit is OVERSAMPLE ticks), cfg (data
// bits, parity, stop bits) and the almost-full/almost-empty thresholds of
// both FIFOs. Each status flag belongs to the clock domain of the FIFO side
// that computes it, as marked below. Both FIFO read ports are first-word
// fall-through: the head word is valid whenever the empty flag is low.
//
// Following the design: the four blocks (baud generator, transmitter,
// receiver, FIFO), their connections, the parameterized FIFO depth and data
// width, programmable divisor and frame format, the port names clk, rst, rx
// and tx. Own choices: two clock inputs, active-high asynchronous reset
// released synchronously in each domain, the overrun pulse, and the
// host-side port list.
module uart_fifo_top
  import uart_pkg::*;
#(
  parameter int unsigned DATA_W     = uart_pkg::DEF_DATA_W,
  parameter int unsigned FIFO_DEPTH = uart_pkg::DEF_FIFO_DEPTH,
  parameter int unsigned OVERSAMPLE = uart_pkg::DEF_OVERSAMPLE,
  parameter int unsigned DIV_W      = uart_pkg::DEF_DIV_W,
  localparam int unsigned AW        = $clog2(FIFO_DEPTH)
) (
  input  logic              clk,            // UART core clock
  input  logic              host_clk,       // host interface clock
  input  logic              rst,            // asynchronous, active high
  // configuration
  input  logic [DIV_W-1:0]  divisor,
  input  uart_cfg_t         cfg,
  input  logic [AW:0]       tx_af_thresh,   // host_clk side
  input  logic [AW:0]       tx_ae_thresh,   // clk side
  input  logic [AW:0]       rx_af_thresh,   // clk side
  input  logic [AW:0]       rx_ae_thresh,   // host_clk side
  // host transmit port (host_clk)
  input  logic              tx_wr_en,
  input  logic [DATA_W-1:0] tx_wr_data,
  output logic              tx_full,
  output logic              tx_almost_full,
  output logic [AW:0]       tx_level,
  // host receive port (host_clk)
  input  logic              rx_rd_en,
  output logic [DATA_W-1:0] rx_rd_data,
  output logic              rx_parity_err,
  output logic              rx_frame_err,
  output logic              rx_empty,
  output logic              rx_almost_empty,
  output logic [AW:0]       rx_level,
  // UART-side status (clk)
  output logic              tx_empty,
  output logic              tx_almost_empty,
  output logic              tx_busy,
  output logic              tx_done,
  output logic              rx_full,
  output logic              rx_almost_full,
  output logic              rx_overrun,
  // serial lines
  input  logic              rx,
  output logic              tx
);
  logic              rst_n_core, rst_n_host;
  logic              tick;
  logic              txf_pop;
  logic [DATA_W-1:0] txf_data;
  logic              rxw_valid, rxw_perr, rxw_ferr;
  logic [DATA_W-1:0] rxw_data;
  logic [DATA_W+1:0] rxf_rd_word;
  logic [AW:0]       txf_rd_level, rxf_wr_level;

  rst_sync u_rst_core (.clk (clk),      .rst_n_in (!rst), .rst_n_out (rst_n_core));
  rst_sync u_rst_host (.clk (host_clk), .rst_n_in (!rst), .rst_n_out (rst_n_host));

  baud_gen #(.DIV_W (DIV_W)) u_baud (
    .clk (clk), .rst_n (rst_n_core), .divisor (divisor), .tick (tick)
  );

  // ---------------- transmit path ----------------
  async_fifo #(.DATA_W (DATA_W), .DEPTH (FIFO_DEPTH)) u_tx_fifo (
    .wclk (host_clk), .wrst_n (rst_n_host),
    .wr_en (tx_wr_en), .wr_data (tx_wr_data), .af_thresh (tx_af_thresh),
    .full (tx_full), .almost_full (tx_almost_full), .wr_level (tx_level),
    .rclk (clk), .rrst_n (rst_n_core),
    .rd_en (txf_pop), .rd_data (txf_data), .ae_thresh (tx_ae_thresh),
    .empty (tx_empty), .almost_empty (tx_almost_empty), .rd_level (txf_rd_level)
  );

  uart_tx #(.DATA_W (DATA_W), .OVERSAMPLE (OVERSAMPLE)) u_tx (
    .clk (clk), .rst_n (rst_n_core), .tick (tick), .cfg (cfg),
    .fifo_empty (tx_empty), .fifo_data (txf_data), .fifo_pop (txf_pop),
    .txd (tx), .busy (tx_busy), .done (tx_done)
  );

  // ---------------- receive path ----------------
  uart_rx #(.DATA_W (DATA_W), .OVERSAMPLE (OVERSAMPLE)) u_rx (
    .clk (clk), .rst_n (rst_n_core), .tick (tick), .cfg (cfg), .rxd (rx),
    .valid (rxw_valid), .data (rxw_data),
    .parity_err (rxw_perr), .frame_err (rxw_ferr)
  );

  async_fifo #(.DATA_W (DATA_W + 2), .DEPTH (FIFO_DEPTH)) u_rx_fifo (
    .wclk (clk), .wrst_n (rst_n_core),
    .wr_en (rxw_valid), .wr_data ({rxw_ferr, rxw_perr, rxw_data}),
    .af_thresh (rx_af_thresh),
    .full (rx_full), .almost_full (rx_almost_full), .wr_level (rxf_wr_level),
    .rclk (host_clk), .rrst_n (rst_n_host),
    .rd_en (rx_rd_en), .rd_data (rxf_rd_word), .ae_thresh (rx_ae_thresh),
    .empty (rx_empty), .almost_empty (rx_almost_empty), .rd_level (rx_level)
  );

  assign {rx_frame_err, rx_parity_err, rx_rd_data} = rxf_rd_word;

  // A word that finds the receive FIFO full is lost: report it.
  always_ff @(posedge clk or negedge rst_n_core) begin
    if (!rst_n_core) rx_overrun <= 1'b0;
    else             rx_overrun <= rxw_valid && rx_full;
  end

  // Levels used only for checking: neither side may exceed the depth.
  a_txf_level: assert property (@(posedge clk) disable iff (!rst_n_core)
                                txf_rd_level <= (AW+1)'(FIFO_DEPTH));
  a_rxf_level: assert property (@(posedge clk) disable iff (!rst_n_core)
                                rxf_wr_level <= (AW+1)'(FIFO_DEPTH));
endmodule
