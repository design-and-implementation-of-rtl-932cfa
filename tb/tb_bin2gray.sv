// tb_bin2gray: self-checking test of bin2gray.
// Checks the 3-bit conversion against the reflected Gray code table, and
// for 8 bits that the code is a bijection in which every pair of
// neighbouring values, the wrap from the largest to zero included, differs
// in exactly one bit, with the top bit equal to the binary top bit.
module tb_bin2gray;
  int checks = 0, failures = 0;

  logic [2:0] b3, g3;
  logic [7:0] b8, g8;
  bin2gray #(.W(3)) dut3 (.bin(b3), .gray(g3));
  bin2gray #(.W(8)) dut8 (.bin(b8), .gray(g8));

  localparam logic [2:0] TABLE3 [8] = '{3'b000, 3'b001, 3'b011, 3'b010,
                                        3'b110, 3'b111, 3'b101, 3'b100};
  logic [7:0] codes [256];
  bit         seen  [256];

  initial begin
    for (int i = 0; i < 8; i++) begin
      b3 = 3'(i); #1;
      checks++;
      if (g3 !== TABLE3[i]) begin
        failures++; $display("FAIL: gray3(%0d)=%b expected %b", i, g3, TABLE3[i]);
      end
    end
    for (int i = 0; i < 256; i++) begin
      b8 = 8'(i); #1;
      codes[i] = g8;
      checks++;
      if (g8[7] !== b8[7]) begin failures++; $display("FAIL: top bit of gray8(%0d)", i); end
    end
    foreach (seen[i]) seen[i] = 0;
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (seen[codes[i]]) begin failures++; $display("FAIL: code %h repeats", codes[i]); end
      seen[codes[i]] = 1;
      checks++;
      if ($countones(codes[i] ^ codes[(i + 1) % 256]) != 1) begin
        failures++; $display("FAIL: gray8(%0d) and its successor differ in more than one bit", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
