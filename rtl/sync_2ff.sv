// sync_2ff: multi-flop synchronizer for a signal entering a clock domain.
//
// A chain of STAGES flip-flops clocked by the destination clock. It is used
// for the Gray-coded FIFO pointers (where only one bit changes per step, so
// a word can be synchronized bit by bit) and for the serial receive line.
// Latency is STAGES destination clock cycles. The reset value is a parameter
// so that an idle-high line can be reset to 1.
module sync_2ff #(
  parameter int unsigned WIDTH   = 1,
  parameter int unsigned STAGES  = 2,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] chain [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) chain[i] <= RESET_VAL;
    end else begin
      chain[0] <= d;
      for (int i = 1; i < STAGES; i++) chain[i] <= chain[i-1];
    end
  end

  assign q = chain[STAGES-1];
endmodule
