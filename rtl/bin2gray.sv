// bin2gray: binary to Gray code conversion.
//
// The top bit of the Gray code equals the top bit of the binary number;
// every lower Gray bit is the XOR of the binary bit at that position and
// the binary bit above it, so g = b ^ (b >> 1). Two consecutive binary
// values therefore differ in exactly one Gray bit, which is what lets a
// pointer cross clock domains through a plain two-flop synchroniser.
// Purely combinational.
module bin2gray #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] bin,
  output logic [W-1:0] gray
);

  always_comb gray = bin ^ (bin >> 1);

endmodule
