// wr_ctrl: write-domain pointer and flag logic of the asynchronous FIFO.
//
// The write pointer counts RAM words in binary with one extra wrap bit
// (AW+1 bits). Its Gray code is registered and handed to the read domain.
// The read pointer arrives from the read domain as a Gray code through a
// two-flop synchroniser; it counts output words, RATIO RAM words each.
// It is decoded back to binary and then widened by RATIO (shifted left by
// log2(RATIO), the "read pointer expansion") so that it counts RAM words
// like the write pointer. The difference of the two is the number of RAM
// words in use as this domain sees it:
//   full      = used == DEPTH
//   prog_full = used >= PROG_FULL_N   (64 words = one 16-beat burst of
//                                      128-bit words)
// Both flags are registers computed from the pointer values after this
// cycle's write, so full is high in the cycle after the last free word is
// written. Because the synchronised read pointer lags, used can only be
// over-estimated: full and prog_full may stay high a few cycles longer
// than needed, never too short, so the RAM is never overwritten.
// Decoding Gray to binary before comparing, and the expansion by 4,
// follow the document; the registered flags are this design's choice.
// Reset is asynchronous and active low: pointers zero, flags low.
module wr_ctrl #(
  parameter int unsigned DEPTH       = fifo_pkg::DEPTH,
  parameter int unsigned RATIO       = fifo_pkg::OUT_W / fifo_pkg::MEM_W,
  parameter int unsigned PROG_FULL_N = fifo_pkg::PROG_FULL_N,
  localparam int unsigned AW  = $clog2(DEPTH),
  localparam int unsigned PW  = AW + 1,             // write pointer width
  localparam int unsigned SH  = $clog2(RATIO),
  localparam int unsigned RPW = PW - SH             // read pointer width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           wr_en,           // one RAM word written this cycle
  input  logic [RPW-1:0] rptr_gray_sync,  // read pointer, synchronised
  output logic [AW-1:0]  waddr,
  output logic [PW-1:0]  wptr_gray,
  output logic           full,
  output logic           prog_full
);

  logic [PW-1:0]  wbin, wbin_next, wgray_next;
  logic [RPW-1:0] rbin_sync;
  logic [PW-1:0]  rword;                 // read pointer in RAM words
  logic [PW-1:0]  used_next;

  gray2bin #(.W(RPW)) u_rg2b (.gray(rptr_gray_sync), .bin(rbin_sync));
  bin2gray #(.W(PW))  u_wb2g (.bin(wbin_next), .gray(wgray_next));

  always_comb begin
    wbin_next = wbin + PW'(wr_en);
    rword     = {rbin_sync, SH'(0)};
    used_next = wbin_next - rword;
    waddr     = wbin[AW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbin      <= '0;
      wptr_gray <= '0;
      full      <= 1'b0;
      prog_full <= 1'b0;
    end else begin
      wbin      <= wbin_next;
      wptr_gray <= wgray_next;
      full      <= used_next >= PW'(DEPTH);
      prog_full <= used_next >= PW'(PROG_FULL_N);
    end
  end

endmodule
