// fifo_pkg: shared widths, sizes and types of the width-adjustable
// asynchronous FIFO system.
//
// The numbers are the design's main configuration: 24-bit RGB888 pixels
// enter, the RAM stores 32-bit words, and the read side delivers 128-bit
// words to a 128-bit Avalon bus that writes bursts of 16 beats. The RAM
// holds 128 words and prog_full rises at 64 stored words, the amount one
// 16-beat burst consumes. The RGB888 byte order inside a pixel (red in the
// top byte) is this design's choice.
package fifo_pkg;

  localparam int unsigned IN_W        = 24;   // pixel width (RGB888)
  localparam int unsigned MEM_W       = 32;   // RAM word width
  localparam int unsigned OUT_W       = 128;  // bus data width
  localparam int unsigned DEPTH       = 128;  // RAM depth in MEM_W words
  localparam int unsigned PROG_FULL_N = 64;   // prog_full threshold, MEM_W words
  localparam int unsigned BURST_LEN   = 16;   // Avalon burst length, OUT_W beats

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb888_t;

endpackage
