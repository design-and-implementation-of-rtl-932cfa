// tb_width_conv_out: self-checking test of width_conv_out (4 x 32 -> 128).
// For every row of a 128-word RAM, checks that the four word addresses
// are row*4 .. row*4+3, that a read loads random words into dout with the
// lowest address in the least significant 32 bits, and that dout holds
// its value on clock edges without a read.
module tb_width_conv_out;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic         rd;
  logic [4:0]   row;
  logic [6:0]   raddr [4];
  logic [31:0]  word  [4];
  logic [127:0] dout;
  logic [127:0] exp;

  width_conv_out dut (.clk(clk), .rd(rd), .row(row), .raddr(raddr), .word(word), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    rd = 0;
    for (int r = 0; r < 32; r++) begin
      for (int n = 0; n < 4; n++) begin
        @(negedge clk);
        row = 5'(r);
        for (int k = 0; k < 4; k++) word[k] = $urandom;
        exp = {word[3], word[2], word[1], word[0]};
        rd = 1;
        #1;
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (raddr[k] !== 7'(4 * r + k)) begin
            failures++; $display("FAIL: row %0d raddr[%0d]=%0d", r, k, raddr[k]);
          end
        end
        @(posedge clk); #1;
        rd = 0;
        for (int k = 0; k < 4; k++) word[k] = $urandom;
        checks++;
        if (dout !== exp) begin
          failures++; $display("FAIL: dout=%h expected %h", dout, exp);
        end
        @(posedge clk); #1;
        checks++;
        if (dout !== exp) begin
          failures++; $display("FAIL: dout changed without a read");
        end
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
