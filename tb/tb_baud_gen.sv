// tb_baud_gen: self-checking test of the baud tick generator.
//
// For a set of divisors (1, 2, 3, 7, 54 and 651, the last two being the
// 16x-oversampled divisors for 115200 and 9600 baud at 100 MHz) it measures
// the number of clock cycles between successive ticks and checks that it
// equals the divisor, and that tick is never high for two cycles in a row
// unless the divisor is 1. A watchdog ends the run if it hangs.
module tb_baud_gen;
  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic [15:0] divisor = 16'd1;
  logic        tick;
  int          checks = 0, failures = 0;

  baud_gen dut (.clk (clk), .rst_n (rst_n), .divisor (divisor), .tick (tick));

  // A reset edge at time 1 so the asynchronous resets take effect.
  initial #1 rst_n = 1'b0;

  always #5 clk = ~clk;

  task automatic check_divisor(input int unsigned d, input int unsigned periods);
    int unsigned last, cyc;
    divisor = 16'(d);
    // let the counter settle on the new divisor
    repeat (2 * d + 4) @(posedge clk);
    // find a tick
    do @(posedge clk); while (!tick);
    for (int p = 0; p < int'(periods); p++) begin
      cyc = 0;
      do begin
        @(posedge clk);
        cyc++;
      end while (!tick);
      checks++;
      if (cyc != d) begin
        failures++;
        $display("FAIL divisor=%0d: tick period %0d cycles", d, cyc);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check_divisor(1, 10);
    check_divisor(2, 10);
    check_divisor(3, 10);
    check_divisor(7, 10);
    check_divisor(54, 5);
    check_divisor(651, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
