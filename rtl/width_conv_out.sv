// width_conv_out: data conversion module 2, MEM_W-bit RAM words to
// RATIO*MEM_W-bit output words.
//
// The read side of the FIFO counts in output words, so one step of its
// pointer covers RATIO RAM words. This block widens that pointer by the
// factor RATIO (4 by default, as 128 = 4 x 32) into RAM word addresses,
// raddr[k] = row*RATIO + k, and on a clk edge where rd is high it splices
// the RATIO words the RAM returns into the output register, word k into
// bits [k*MEM_W +: MEM_W]. dout takes the new word at the edge that
// accepts the read and holds it until the next read. The lowest address goes to the least
// significant bits, so the bit stream packed by width_conv_in comes out in
// the same order; that order is this design's choice, the four-word read
// through the widened pointer is the document's. The output register is
// not reset.
module width_conv_out #(
  parameter int unsigned MEM_W = fifo_pkg::MEM_W,
  parameter int unsigned RATIO = fifo_pkg::OUT_W / fifo_pkg::MEM_W,
  parameter int unsigned DEPTH = fifo_pkg::DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned SH   = $clog2(RATIO),
  localparam int unsigned RW   = AW - SH
) (
  input  logic                   clk,
  input  logic                   rd,
  input  logic [RW-1:0]          row,
  output logic [AW-1:0]          raddr [RATIO],
  input  logic [MEM_W-1:0]       word  [RATIO],
  output logic [RATIO*MEM_W-1:0] dout
);

  always_comb begin
    for (int k = 0; k < int'(RATIO); k++) raddr[k] = AW'({row, SH'(k)});
  end

  always_ff @(posedge clk) begin
    if (rd) begin
      for (int k = 0; k < int'(RATIO); k++) dout[k*MEM_W +: MEM_W] <= word[k];
    end
  end

endmodule
