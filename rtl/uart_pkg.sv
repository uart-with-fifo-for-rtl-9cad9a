// uart_pkg: types and constants shared by the UART-with-FIFO design.
//
// The frame format is programmable at run time: number of data bits,
// parity mode (none, even, odd) and one or two stop bits. These three
// settings travel together as uart_cfg_t. The default sizes here are the
// design's main configuration: 8-bit data words, 16-entry FIFOs (the depth
// the design reports fitting in one block RAM) and 16 baud ticks per bit
// (an oversampling ratio this implementation chooses so the receiver can
// wait half a bit and sample at bit centres).
package uart_pkg;

  parameter int unsigned DEF_DATA_W     = 8;   // data word width, "usually 8"
  parameter int unsigned DEF_FIFO_DEPTH = 16;  // 16-byte FIFO depth
  parameter int unsigned DEF_OVERSAMPLE = 16;  // baud ticks per bit (own choice)
  parameter int unsigned DEF_DIV_W      = 16;  // width of the baud divisor

  // Width of a field that can hold the numbers 0..DEF_DATA_W.
  parameter int unsigned NBITS_W = $clog2(DEF_DATA_W + 1);

  typedef enum logic [1:0] {
    PAR_NONE = 2'd0,
    PAR_EVEN = 2'd1,
    PAR_ODD  = 2'd2
  } parity_e;

  typedef struct packed {
    logic [NBITS_W-1:0] data_bits;  // 1..DEF_DATA_W data bits per frame
    parity_e            parity;     // parity mode
    logic               two_stop;   // 0: one stop bit, 1: two stop bits
  } uart_cfg_t;

  // Reflected binary (Gray) code conversions for FIFO pointers.
  function automatic logic [31:0] bin2gray(input logic [31:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [31:0] gray2bin(input logic [31:0] g);
    logic [31:0] b;
    b[31] = g[31];
    for (int i = 30; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
