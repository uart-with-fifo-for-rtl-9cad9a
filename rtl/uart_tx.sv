// uart_tx: UART transmitter, parallel-to-serial frame generator.
//
// When the transmit FIFO signals that a word is available (fifo_empty low)
// and the transmitter is idle, it pops the word (fifo_pop for one cycle; the
// FIFO shows its head word on fifo_data before the pop) into a shift
// register and sends the frame
//     start (0) | data bits, LSB first | optional parity | 1 or 2 stops (1)
// with each element lasting OVERSAMPLE ticks of the baud generator. A state
// machine steps through the frame elements. busy is high from the pop until
// the last stop bit ends; done pulses for one cycle at that point, which is
// also when the next word can be popped, so a full FIFO is sent back to back
// with no idle time between frames. txd idles high.
//
// Following the design: start bit low, LSB-first data with a configurable
// count, optional parity, one or more stop bits, busy and transmit-complete
// status. Own choices: the frame format (cfg) is sampled when a word is
// popped and held for the frame; even parity makes the number of ones in
// data plus parity even, odd parity makes it odd; at most two stop bits.
// The first bit can be up to one tick shorter than the others because a
// frame starts on a clock edge, not on a tick; at 16 ticks per bit this is
// under 1/16 of a bit and is absorbed by the receiver's mid-bit sampling.
module uart_tx
  import uart_pkg::*;
#(
  parameter int unsigned DATA_W     = uart_pkg::DEF_DATA_W,
  parameter int unsigned OVERSAMPLE = uart_pkg::DEF_OVERSAMPLE
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,        // baud tick, OVERSAMPLE per bit
  input  uart_cfg_t         cfg,         // frame format
  // transmit FIFO read side (head word visible before the pop)
  input  logic              fifo_empty,
  input  logic [DATA_W-1:0] fifo_data,
  output logic              fifo_pop,
  // serial line and status
  output logic              txd,
  output logic              busy,
  output logic              done
);
  localparam int unsigned TCNT_W = $clog2(OVERSAMPLE);
  localparam int unsigned BCNT_W = $clog2(DATA_W + 1);

  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_PARITY, S_STOP} state_e;

  state_e            state;
  uart_cfg_t         cfg_q;
  logic [DATA_W-1:0] shreg;
  logic              par_bit;
  logic [TCNT_W-1:0] tcnt;       // ticks elapsed within the current bit
  logic [BCNT_W-1:0] bcnt;       // data bits sent so far
  logic              stop2;      // second stop bit in progress
  logic              bit_end;    // last tick of the current bit
  logic [DATA_W-1:0] masked;     // popped word limited to the configured bits

  assign bit_end = tick && (tcnt == TCNT_W'(OVERSAMPLE - 1));

  always_comb begin
    for (int i = 0; i < DATA_W; i++)
      masked[i] = fifo_data[i] && (i < int'(cfg.data_bits));
  end

  assign fifo_pop = (state == S_IDLE) && !fifo_empty;
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cfg_q   <= '0;
      shreg   <= '0;
      par_bit <= 1'b0;
      tcnt    <= '0;
      bcnt    <= '0;
      stop2   <= 1'b0;
      txd     <= 1'b1;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (tick) tcnt <= tcnt + TCNT_W'(1);
      unique case (state)
        S_IDLE: begin
          txd <= 1'b1;
          if (!fifo_empty) begin
            state   <= S_START;
            cfg_q   <= cfg;
            shreg   <= masked;
            par_bit <= (^masked) ^ (cfg.parity == PAR_ODD);
            tcnt    <= '0;
            bcnt    <= '0;
            stop2   <= 1'b0;
            txd     <= 1'b0;               // start bit
          end
        end
        S_START: begin
          if (bit_end) begin
            state <= S_DATA;
            txd   <= shreg[0];
          end
        end
        S_DATA: begin
          if (bit_end) begin
            shreg <= shreg >> 1;
            bcnt  <= bcnt + BCNT_W'(1);
            if (bcnt + BCNT_W'(1) >= cfg_q.data_bits) begin
              if (cfg_q.parity != PAR_NONE) begin
                state <= S_PARITY;
                txd   <= par_bit;
              end else begin
                state <= S_STOP;
                txd   <= 1'b1;
              end
            end else begin
              txd <= shreg[1];
            end
          end
        end
        S_PARITY: begin
          if (bit_end) begin
            state <= S_STOP;
            txd   <= 1'b1;
          end
        end
        S_STOP: begin
          txd <= 1'b1;
          if (bit_end) begin
            if (cfg_q.two_stop && !stop2) begin
              stop2 <= 1'b1;
            end else begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A pop only ever happens while idle, and never from an empty FIFO.
  a_pop_not_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                    fifo_pop |-> !fifo_empty);
endmodule
