// baud_gen: programmable baud-rate tick generator.
//
// A counter runs on the system clock and produces a one-cycle tick when it
// reaches the programmed divisor, then starts again, so tick has a period of
// `divisor` clock cycles (a divisor of 0 or 1 gives a tick every cycle).
// This follows the counter-and-compare generator described for the design.
// The UART transmitter and receiver use OVERSAMPLE ticks per bit, so for a
// clock f_clk and a baud rate B the divisor is f_clk / (B * OVERSAMPLE),
// e.g. 54 for 115200 baud at 100 MHz. Changing the divisor takes effect at
// once; the counter restarts if it is already past the new value.
module baud_gen #(
  parameter int unsigned DIV_W = uart_pkg::DEF_DIV_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] divisor,
  output logic             tick
);
  logic [DIV_W-1:0] count;
  logic             at_end;

  // Count runs 1..divisor; the tick marks the cycle on which it reaches it.
  assign at_end = (count >= divisor);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= DIV_W'(1);
      tick  <= 1'b0;
    end else begin
      tick  <= at_end;
      count <= at_end ? DIV_W'(1) : count + DIV_W'(1);
    end
  end
endmodule
