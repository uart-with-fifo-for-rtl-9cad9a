// uart_rx: UART receiver, serial-to-parallel frame assembler.
//
// The serial input is first passed through a two-flop synchronizer. While
// idle the receiver watches the line for a falling edge (high to low), the
// beginning of a start bit. It then waits half a bit (OVERSAMPLE/2 baud
// ticks) and looks again: if the line is still low the start bit is valid,
// otherwise it was a glitch and the receiver goes back to idle. From the
// middle of the start bit it samples every OVERSAMPLE ticks, so each data
// bit, the parity bit and the stop bit are sampled near their middles.
// Data bits are shifted in LSB first. When the stop bit has been sampled,
// valid pulses for one cycle with the word and two flags: parity_err (the
// parity bit does not match the selected parity; always 0 with parity off)
// and frame_err (the stop bit was sampled low). The word is right-aligned:
// with fewer than DATA_W data bits the upper bits are 0.
//
// Following the design: falling-edge start detection, half-bit wait,
// mid-bit sampling, shift register, optional parity check, parity and
// framing error status passed to the receive FIFO with the word. Own
// choices: 16 ticks per bit, the frame format is sampled at the start
// edge, only the first stop bit is checked (a second stop bit reads as idle
// line), and after a framing error a new frame needs a fresh falling edge.
// Timing: valid comes about half a bit after the stop bit begins, plus the
// two cycles of the synchronizer.
module uart_rx
  import uart_pkg::*;
#(
  parameter int unsigned DATA_W     = uart_pkg::DEF_DATA_W,
  parameter int unsigned OVERSAMPLE = uart_pkg::DEF_OVERSAMPLE
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,        // baud tick, OVERSAMPLE per bit
  input  uart_cfg_t         cfg,         // frame format
  input  logic              rxd,         // asynchronous serial input
  output logic              valid,       // one-cycle: word and flags valid
  output logic [DATA_W-1:0] data,
  output logic              parity_err,
  output logic              frame_err
);
  localparam int unsigned TCNT_W = $clog2(OVERSAMPLE);
  localparam int unsigned BCNT_W = $clog2(DATA_W + 1);

  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_PARITY, S_STOP} state_e;

  state_e            state;
  logic [NBITS_W-1:0] nbits_q;   // frame format captured at the start edge
  parity_e           parity_q;
  logic              rx_s, rx_prev;
  logic [DATA_W-1:0] shreg;
  logic              par_acc;
  logic [TCNT_W-1:0] tcnt;
  logic [BCNT_W-1:0] bcnt;
  logic              half_pt, full_pt;

  sync_2ff #(.WIDTH(1), .STAGES(2), .RESET_VAL(1'b1)) u_sync (
    .clk (clk), .rst_n (rst_n), .d (rxd), .q (rx_s)
  );

  assign half_pt = tick && (tcnt == TCNT_W'(OVERSAMPLE / 2 - 1));
  assign full_pt = tick && (tcnt == TCNT_W'(OVERSAMPLE - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      nbits_q    <= '0;
      parity_q   <= PAR_NONE;
      rx_prev    <= 1'b1;
      shreg      <= '0;
      par_acc    <= 1'b0;
      tcnt       <= '0;
      bcnt       <= '0;
      valid      <= 1'b0;
      data       <= '0;
      parity_err <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      rx_prev <= rx_s;
      valid   <= 1'b0;
      if (tick) tcnt <= tcnt + TCNT_W'(1);
      unique case (state)
        S_IDLE: begin
          if (rx_prev && !rx_s) begin          // falling edge: start bit
            state   <= S_START;
            nbits_q  <= cfg.data_bits;
            parity_q <= cfg.parity;
            tcnt    <= '0;
            bcnt    <= '0;
            par_acc <= 1'b0;
          end
        end
        S_START: begin
          if (half_pt) begin
            tcnt  <= '0;
            state <= rx_s ? S_IDLE : S_DATA;   // glitch or valid start
          end
        end
        S_DATA: begin
          if (full_pt) begin
            shreg   <= {rx_s, shreg[DATA_W-1:1]};
            par_acc <= par_acc ^ rx_s;
            bcnt    <= bcnt + BCNT_W'(1);
            if (bcnt + BCNT_W'(1) >= nbits_q)
              state <= (parity_q != PAR_NONE) ? S_PARITY : S_STOP;
          end
        end
        S_PARITY: begin
          if (full_pt) begin
            par_acc <= par_acc ^ rx_s ^ (parity_q == PAR_ODD);
            state   <= S_STOP;
          end
        end
        S_STOP: begin
          if (full_pt) begin
            state      <= S_IDLE;
            valid      <= 1'b1;
            data       <= shreg >> (DATA_W - int'(nbits_q));
            parity_err <= (parity_q != PAR_NONE) && par_acc;
            frame_err  <= !rx_s;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
