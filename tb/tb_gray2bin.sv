// tb_gray2bin: self-checking test of gray2bin.
// Decodes the 3-bit reflected Gray code table, and for 10 bits checks that
// decoding the Gray code g = b ^ (b >> 1) of every value b returns b.
module tb_gray2bin;
  int checks = 0, failures = 0;

  logic [2:0] g3, b3;
  logic [9:0] g10, b10;
  gray2bin #(.W(3))  dut3  (.gray(g3),  .bin(b3));
  gray2bin #(.W(10)) dut10 (.gray(g10), .bin(b10));

  localparam logic [2:0] TABLE3 [8] = '{3'b000, 3'b001, 3'b011, 3'b010,
                                        3'b110, 3'b111, 3'b101, 3'b100};

  initial begin
    for (int i = 0; i < 8; i++) begin
      g3 = TABLE3[i]; #1;
      checks++;
      if (b3 !== 3'(i)) begin
        failures++; $display("FAIL: bin(%b)=%0d expected %0d", g3, b3, i);
      end
    end
    for (int i = 0; i < 1024; i++) begin
      g10 = 10'(i) ^ (10'(i) >> 1); #1;
      checks++;
      if (b10 !== 10'(i)) begin
        failures++; $display("FAIL: bin(%b)=%0d expected %0d", g10, b10, i);
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
