// tb_uart_rx: self-checking test of the UART receiver.
//
// A serial driver in the testbench sends frames on rxd with a chosen bit
// length in clock cycles; the baud tick comes from a counter here. Each
// frame's expected word and error flags are queued and compared with what
// the receiver reports on valid. Covered: several frame formats (8N1, 8E1,
// 8O1, 7O2, 5N1), deliberately wrong parity bits (parity_err), stop bits
// sent low (frame_err, after which the line goes high again), a short low
// glitch that must not start a frame, and senders whose bit time is about
// 3% longer or shorter than the receiver's. It also checks the latency:
// valid must come about half a bit into the stop bit.
module tb_uart_rx;
  import uart_pkg::*;
  localparam int DIV  = 4;
  localparam int OS   = 16;
  localparam int BITC = DIV * OS;

  logic       clk = 1'b0, rst_n = 1'b1;
  logic       tick;
  uart_cfg_t  cfg;
  logic       rxd = 1'b1;
  logic       valid, parity_err, frame_err;
  logic [7:0] data;
  int         checks = 0, failures = 0;
  int         tcount = 0;
  longint     cyc = 0;
  int         valids = 0;

  typedef struct {
    logic [7:0] d;
    bit         pe, fe;
    longint     due;     // cycle at which valid is expected
  } exp_t;
  exp_t expq[$];

  uart_rx dut (.clk (clk), .rst_n (rst_n), .tick (tick), .cfg (cfg), .rxd (rxd),
               .valid (valid), .data (data), .parity_err (parity_err),
               .frame_err (frame_err));

  // A reset edge at time 1 so the asynchronous resets take effect.
  initial #1 rst_n = 1'b0;

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    tcount <= (tcount == DIV - 1) ? 0 : tcount + 1;
    cyc    <= cyc + 1;
  end
  assign tick = (tcount == DIV - 1);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // Compare every valid with the oldest expected frame.
  always @(posedge clk) begin
    if (rst_n && valid) begin
      valids++;
      if (expq.size() == 0) check(0, "unexpected valid");
      else begin
        exp_t e;
        e = expq.pop_front();
        check(data == e.d, $sformatf("data got %h expected %h", data, e.d));
        check(parity_err == e.pe, $sformatf("parity_err got %0b expected %0b", parity_err, e.pe));
        check(frame_err == e.fe, $sformatf("frame_err got %0b expected %0b", frame_err, e.fe));
        check(cyc >= e.due - longint'(DIV) - 1 && cyc <= e.due + longint'(DIV) + 4,
              $sformatf("valid at cycle %0d, expected near %0d", cyc, e.due));
      end
    end
  end

  // Send one frame. bitc: sender's bit length in cycles; bad_par flips the
  // parity bit; bad_stop sends the (first) stop bit low.
  task automatic send(input logic [7:0] w, input int bitc, input bit bad_par,
                      input bit bad_stop);
    int   nb = int'(cfg.data_bits);
    bit   p  = (cfg.parity == PAR_ODD);
    exp_t e;
    for (int i = 0; i < nb; i++) p ^= w[i];
    e.d   = w & 8'((1 << nb) - 1);
    e.pe  = bad_par && (cfg.parity != PAR_NONE);
    e.fe  = bad_stop;
    // valid expected half a receiver bit into the stop bit (the receiver
    // times the frame with its own bit length), plus synchronizer delay
    e.due = cyc + longint'((1 + nb + int'(cfg.parity != PAR_NONE)) * BITC + BITC / 2 + 3);
    expq.push_back(e);
    rxd <= 1'b0;
    repeat (bitc) @(posedge clk);
    for (int i = 0; i < nb; i++) begin
      rxd <= w[i];
      repeat (bitc) @(posedge clk);
    end
    if (cfg.parity != PAR_NONE) begin
      rxd <= p ^ bad_par;
      repeat (bitc) @(posedge clk);
    end
    rxd <= !bad_stop;
    repeat (bitc) @(posedge clk);
    if (bad_stop) begin
      // hold the line low a little longer, then release to idle
      repeat (bitc / 2) @(posedge clk);
      rxd <= 1'b1;
      repeat (bitc) @(posedge clk);
    end
    if (cfg.two_stop) begin
      rxd <= 1'b1;
      repeat (bitc) @(posedge clk);
    end
  endtask

  task automatic set_cfg(input int nbits, input parity_e par, input bit two);
    cfg.data_bits = NBITS_W'(nbits);
    cfg.parity    = par;
    cfg.two_stop  = two;
  endtask

  task automatic send_batch(input int n, input int bitc);
    for (int i = 0; i < n; i++) begin
      logic [7:0] w;
      w = 8'($urandom);
      if (i == 0) w = 8'h55;
      if (i == 1) w = 8'hAA;
      if (i == 2) w = 8'h00;
      if (i == 3) w = 8'hFF;
      send(w, bitc, 1'b0, 1'b0);
    end
  endtask

  initial begin
    int v0;
    set_cfg(8, PAR_NONE, 0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);

    send_batch(8, BITC);
    set_cfg(8, PAR_EVEN, 0);  send_batch(6, BITC);
    set_cfg(8, PAR_ODD, 0);   send_batch(6, BITC);
    set_cfg(7, PAR_ODD, 1);   send_batch(6, BITC);
    set_cfg(5, PAR_NONE, 0);  send_batch(6, BITC);

    // parity errors
    set_cfg(8, PAR_EVEN, 0);
    send(8'h3C, BITC, 1'b1, 1'b0);
    send(8'h81, BITC, 1'b0, 1'b0);
    set_cfg(8, PAR_ODD, 0);
    send(8'h7E, BITC, 1'b1, 1'b0);

    // framing errors
    set_cfg(8, PAR_NONE, 0);
    send(8'hA5, BITC, 1'b0, 1'b1);
    send(8'h5A, BITC, 1'b0, 1'b0);
    set_cfg(8, PAR_EVEN, 0);
    send(8'h0F, BITC, 1'b1, 1'b1);

    // a glitch shorter than half a bit must not start a frame
    set_cfg(8, PAR_NONE, 0);
    repeat (BITC) @(posedge clk);
    v0 = valids;
    rxd <= 1'b0;
    repeat (BITC / 4) @(posedge clk);
    rxd <= 1'b1;
    repeat (3 * BITC) @(posedge clk);
    check(valids == v0, "glitch rejected");
    send(8'hC3, BITC, 1'b0, 1'b0);

    // sender clock about 3% fast and 3% slow
    send_batch(6, BITC - 2);
    send_batch(6, BITC + 2);

    repeat (2 * BITC) @(posedge clk);
    check(expq.size() == 0, $sformatf("%0d frames never reported", expq.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
