// width_conv_in: data conversion module 1, IN_W-bit input to MEM_W-bit
// RAM words.
//
// Input words are laid end to end into a bit stream, the first one in the
// least significant bits, and the stream is cut into MEM_W-bit RAM words.
// With the default 24-bit pixels and 32-bit words, four pixels p0..p3 fill
// exactly three words:
//   word0 = {p1[7:0],  p0}
//   word1 = {p2[15:0], p1[23:8]}
//   word2 = {p3,       p2[23:16]}
// so no RAM bit is wasted. The four-into-three packing follows the
// document; the little-endian order of the stream is this design's choice.
//
// A residue register keeps the bits of the last input that did not yet
// make up a full word. When din_en is high and full is low the input is
// accepted; if the residue plus the input reach MEM_W bits, wr_en is high
// in that same cycle and wr_data carries the completed word
// (combinational from the residue and din), so the RAM and the write
// pointer take it at the same clock edge as the input. Each input yields
// at most one word (IN_W <= MEM_W), so a single free RAM word is always
// enough to accept one input. Inputs offered while full is high are
// ignored; the writer is expected to hold them.
module width_conv_in #(
  parameter int unsigned IN_W  = fifo_pkg::IN_W,
  parameter int unsigned MEM_W = fifo_pkg::MEM_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IN_W-1:0]  din,
  input  logic             din_en,
  input  logic             full,
  output logic             wr_en,
  output logic [MEM_W-1:0] wr_data
);

  localparam int unsigned ACC_W = IN_W + MEM_W;
  localparam int unsigned CNT_W = $clog2(ACC_W + 1);

  if (IN_W > MEM_W) begin : g_bad_width
    $error("width_conv_in: IN_W must not exceed MEM_W");
  end

  logic [ACC_W-1:0] residue;    // valid bits are residue[cnt-1:0], rest zero
  logic [CNT_W-1:0] cnt;        // number of valid residue bits (< MEM_W)
  logic [ACC_W-1:0] joined;
  logic [CNT_W-1:0] total;
  logic             accept;

  always_comb begin
    accept  = din_en && !full;
    joined  = residue | (ACC_W'(din) << cnt);
    total   = cnt + CNT_W'(IN_W);
    wr_en   = accept && (total >= CNT_W'(MEM_W));
    wr_data = joined[MEM_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      residue <= '0;
      cnt     <= '0;
    end else if (accept) begin
      if (total >= CNT_W'(MEM_W)) begin
        residue <= joined >> MEM_W;
        cnt     <= total - CNT_W'(MEM_W);
      end else begin
        residue <= joined;
        cnt     <= total;
      end
    end
  end

endmodule
