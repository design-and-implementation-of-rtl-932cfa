// rd_ctrl: read-domain pointer and flag logic of the asynchronous FIFO.
//
// The read pointer counts output words (RATIO RAM words each) in binary
// with one extra wrap bit. Its Gray code is registered and handed to the
// write domain. The write pointer arrives as a Gray code through a
// two-flop synchroniser, is decoded to binary and shifted right by
// log2(RATIO), which gives the number of complete output words written so
// far. empty is high when the read pointer has caught up with that count,
// i.e. when fewer than RATIO unread RAM words are stored and a read could
// not deliver a full output word. The flag is a register computed from the
// pointer after this cycle's read. Because the synchronised write pointer
// lags, empty may stay high a few cycles longer than needed, never too
// short, so the FIFO is never over-read.
//
// rd_fire = rd_req && !empty is the accepted read; row is the RAM row
// (output-word address) it reads. Reset is asynchronous, active low:
// pointer zero, empty high. empty is active high; the document's one
// mention of it as "output low level" is read as a slip.
module rd_ctrl #(
  parameter int unsigned DEPTH = fifo_pkg::DEPTH,
  parameter int unsigned RATIO = fifo_pkg::OUT_W / fifo_pkg::MEM_W,
  localparam int unsigned AW  = $clog2(DEPTH),
  localparam int unsigned PW  = AW + 1,             // write pointer width
  localparam int unsigned SH  = $clog2(RATIO),
  localparam int unsigned RPW = PW - SH,            // read pointer width
  localparam int unsigned RW  = RPW - 1             // row address width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           rd_req,
  input  logic [PW-1:0]  wptr_gray_sync,  // write pointer, synchronised
  output logic           rd_fire,
  output logic [RW-1:0]  row,
  output logic [RPW-1:0] rptr_gray,
  output logic           empty
);

  logic [RPW-1:0] rbin, rbin_next, rgray_next;
  logic [PW-1:0]  wbin_sync;
  logic [RPW-1:0] wrows;                 // complete output words written

  gray2bin #(.W(PW))  u_wg2b (.gray(wptr_gray_sync), .bin(wbin_sync));
  bin2gray #(.W(RPW)) u_rb2g (.bin(rbin_next), .gray(rgray_next));

  always_comb begin
    rd_fire   = rd_req && !empty;
    rbin_next = rbin + RPW'(rd_fire);
    wrows     = RPW'(wbin_sync >> SH);
    row       = rbin[RW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbin      <= '0;
      rptr_gray <= '0;
      empty     <= 1'b1;
    end else begin
      rbin      <= rbin_next;
      rptr_gray <= rgray_next;
      empty     <= rbin_next == wrows;
    end
  end

endmodule
