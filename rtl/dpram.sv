// dpram: dual-port RAM between the two clock domains.
//
// The write port, in the write clock domain, stores one MEM_W-bit word per
// wclk edge at waddr when we is high. The read port returns the NRD words
// at raddr[0..NRD-1] at once, combinationally; the register that captures
// them sits in width_conv_out, in the read clock domain, and a synthesis
// tool can pull it into a block RAM's output register. The FIFO always
// reads four consecutive, aligned words, so the read port maps to four
// 32-bit banks interleaved on the two low address bits. A 32-bit
// dual-port RAM is the design's; the four-word read port and where the
// read register sits are this implementation's choices. The contents are
// not reset.
module dpram #(
  parameter int unsigned MEM_W = fifo_pkg::MEM_W,
  parameter int unsigned DEPTH = fifo_pkg::DEPTH,
  parameter int unsigned NRD   = fifo_pkg::OUT_W / fifo_pkg::MEM_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [MEM_W-1:0] wdata,
  input  logic [AW-1:0]    raddr [NRD],
  output logic [MEM_W-1:0] rdata [NRD]
);

  logic [MEM_W-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int k = 0; k < int'(NRD); k++) rdata[k] = mem[raddr[k]];
  end

endmodule
