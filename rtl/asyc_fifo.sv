// asyc_fifo: asynchronous FIFO with different input and output widths.
//
// Pixels of IN_W bits (24, RGB888) are written in the din_clk domain and
// words of OUT_W bits (128) are read in the dout_clk domain. Three parts
// sit in a row:
//   width_conv_in   packs the 24-bit inputs into 32-bit RAM words, four
//                   inputs into three words;
//   dpram           stores DEPTH (128) 32-bit words, written one word at a
//                   time and read four words at a time;
//   width_conv_out  turns the 128-bit read pointer into four consecutive
//                   word addresses and splices the four words into the
//                   dout register.
// wr_ctrl and rd_ctrl keep the binary pointers and the flags. Each pointer
// crosses to the other domain as a Gray code through a two-flop
// synchroniser (sync_2ff) and is decoded to binary before the comparison;
// in the write domain the read pointer is multiplied by four so that both
// count 32-bit words.
//
// Write side: din is taken on a din_clk edge where din_en is high and full
// is low; an input offered while full is high is ignored. full is high
// when all DEPTH words are used, prog_full when at least PROG_FULL_N (64)
// are, which is the 16 x 128 bits of one bus burst.
// Read side: a read happens on a dout_clk edge where dout_en is high and
// empty is low; dout takes the word at that same edge and holds it
// until the next read. empty is high while fewer than four unread words
// are stored. Bits of a last, incomplete group of inputs stay inside until
// later inputs complete the group.
// Both resets are asynchronous and active low; assert both together.
// The structure, the widths, the Gray pointers with two-flop
// synchronisers and the prog_full threshold follow the document; the
// depth of 128 words is read from its test description; the registered
// flags, reset and read latency are this design's choices.
module asyc_fifo #(
  parameter int unsigned IN_W        = fifo_pkg::IN_W,
  parameter int unsigned MEM_W       = fifo_pkg::MEM_W,
  parameter int unsigned OUT_W       = fifo_pkg::OUT_W,
  parameter int unsigned DEPTH       = fifo_pkg::DEPTH,
  parameter int unsigned PROG_FULL_N = fifo_pkg::PROG_FULL_N
) (
  // write (input) side
  input  logic             din_clk,
  input  logic             din_rst_n,
  input  logic [IN_W-1:0]  din,
  input  logic             din_en,
  output logic             full,
  output logic             prog_full,
  // read (output) side
  input  logic             dout_clk,
  input  logic             dout_rst_n,
  input  logic             dout_en,
  output logic [OUT_W-1:0] dout,
  output logic             empty
);

  localparam int unsigned RATIO = OUT_W / MEM_W;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned PW    = AW + 1;
  localparam int unsigned SH    = $clog2(RATIO);
  localparam int unsigned RPW   = PW - SH;
  localparam int unsigned RW    = RPW - 1;

  if (IN_W > MEM_W || OUT_W != RATIO * MEM_W || RATIO < 2 ||
      (1 << SH) != RATIO || (1 << AW) != DEPTH || DEPTH < 2 * RATIO ||
      PROG_FULL_N > DEPTH) begin : g_bad_param
    $error("asyc_fifo: unsupported combination of widths and depth");
  end

  // write domain
  logic             wr_en;
  logic [MEM_W-1:0] wr_data;
  logic [AW-1:0]    waddr;
  logic [PW-1:0]    wptr_gray, wptr_gray_sync;
  logic [RPW-1:0]   rptr_gray_sync;

  // read domain
  logic             rd_fire;
  logic [RW-1:0]    row;
  logic [RPW-1:0]   rptr_gray;
  logic [AW-1:0]    raddr [RATIO];
  logic [MEM_W-1:0] rword [RATIO];

  width_conv_in #(.IN_W(IN_W), .MEM_W(MEM_W)) u_conv_in (
    .clk(din_clk), .rst_n(din_rst_n), .din(din), .din_en(din_en),
    .full(full), .wr_en(wr_en), .wr_data(wr_data)
  );

  wr_ctrl #(.DEPTH(DEPTH), .RATIO(RATIO), .PROG_FULL_N(PROG_FULL_N)) u_wr_ctrl (
    .clk(din_clk), .rst_n(din_rst_n), .wr_en(wr_en),
    .rptr_gray_sync(rptr_gray_sync), .waddr(waddr), .wptr_gray(wptr_gray),
    .full(full), .prog_full(prog_full)
  );

  sync_2ff #(.W(RPW)) u_sync_r2w (
    .clk(din_clk), .rst_n(din_rst_n), .d(rptr_gray), .q(rptr_gray_sync)
  );

  sync_2ff #(.W(PW)) u_sync_w2r (
    .clk(dout_clk), .rst_n(dout_rst_n), .d(wptr_gray), .q(wptr_gray_sync)
  );

  rd_ctrl #(.DEPTH(DEPTH), .RATIO(RATIO)) u_rd_ctrl (
    .clk(dout_clk), .rst_n(dout_rst_n), .rd_req(dout_en),
    .wptr_gray_sync(wptr_gray_sync), .rd_fire(rd_fire), .row(row),
    .rptr_gray(rptr_gray), .empty(empty)
  );

  dpram #(.MEM_W(MEM_W), .DEPTH(DEPTH), .NRD(RATIO)) u_ram (
    .wclk(din_clk), .we(wr_en), .waddr(waddr), .wdata(wr_data),
    .raddr(raddr), .rdata(rword)
  );

  width_conv_out #(.MEM_W(MEM_W), .RATIO(RATIO), .DEPTH(DEPTH)) u_conv_out (
    .clk(dout_clk), .rd(rd_fire), .row(row), .raddr(raddr), .word(rword), .dout(dout)
  );

  // No RAM word may be written while the FIFO is full.
  a_no_write_when_full: assert property (
    @(posedge din_clk) disable iff (!din_rst_n) wr_en |-> !full
  ) else $error("asyc_fifo: RAM written while full");

endmodule
