// tb_sync_2ff: self-checking test of sync_2ff.
// Drives random values and checks that the output is zero after reset and
// then equals the input of exactly two clock edges before.
module tb_sync_2ff;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [5:0] d, q;
  logic [5:0] hist [3];

  sync_2ff #(.W(6)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    d = 6'h2a;
    #12;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL: q not cleared by reset"); end
    rst_n = 1;
    hist = '{default: '0};
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      // hist[0]: input sampled at the last edge, hist[1]: the edge before
      if (n >= 2) begin
        checks++;
        if (q !== hist[1]) begin
          failures++; $display("FAIL: q=%h expected %h", q, hist[1]);
        end
      end
      d = 6'($urandom);
      @(posedge clk);
      hist[1] = hist[0];
      hist[0] = d;
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
