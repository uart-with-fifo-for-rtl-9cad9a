// rst_sync: reset synchronizer, asynchronous assertion, synchronous release.
//
// rst_n_out goes low as soon as rst_n_in goes low and returns high two
// clock edges after rst_n_in is released, so every flip-flop of the clock
// domain leaves reset on the same edge. One instance is used per clock
// domain of the UART-with-FIFO top.
module rst_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      meta      <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      meta      <= 1'b1;
      rst_n_out <= meta;
    end
  end
endmodule
