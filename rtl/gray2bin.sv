// gray2bin: Gray code to binary conversion.
//
// The top binary bit equals the top Gray bit; each lower binary bit is the
// XOR of the Gray bit at that position with the binary bit just above it,
// i.e. the XOR of all Gray bits from the top down to that position. The
// FIFO decodes synchronised Gray pointers back to binary with this block
// before it compares them for the empty and full flags.
// Purely combinational; a ripple of W-1 XOR gates.
module gray2bin #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] gray,
  output logic [W-1:0] bin
);

  always_comb begin
    bin[W-1] = gray[W-1];
    for (int i = int'(W) - 2; i >= 0; i--) begin
      bin[i] = bin[i+1] ^ gray[i];
    end
  end

endmodule
