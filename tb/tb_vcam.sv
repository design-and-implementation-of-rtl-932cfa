// tb_vcam: self-checking test of vcam on a 5 x 3 frame.
// With random en and ready, checks every cycle that pix_valid follows en,
// that the pixel is the pattern value of a position counter kept by the
// testbench (r = x, g = y, b = x ^ y ^ frame), that sof and eol mark the
// first pixel of a frame and the last of a line, and that a pixel is held
// while ready is low.
module tb_vcam;
  localparam int H = 5, V = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic en, ready;
  fifo_pkg::rgb888_t pix;
  logic pix_valid, sof, eol;
  int x = 0, y = 0, frame = 0, steps = 0;

  vcam #(.H_RES(H), .V_RES(V)) dut (.clk(clk), .rst_n(rst_n), .en(en), .ready(ready),
                                    .pix(pix), .pix_valid(pix_valid), .sof(sof), .eol(eol));

  always #5 clk = ~clk;

  initial begin
    en = 0; ready = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      ready = ($urandom % 3) != 0;
      #1;
      checks += 6;
      if (pix_valid !== en) begin failures++; $display("FAIL: pix_valid=%b en=%b", pix_valid, en); end
      if (pix.r !== 8'(x)) begin failures++; $display("FAIL: r=%0d expected %0d", pix.r, x); end
      if (pix.g !== 8'(y)) begin failures++; $display("FAIL: g=%0d expected %0d", pix.g, y); end
      if (pix.b !== 8'(x ^ y ^ frame)) begin failures++; $display("FAIL: b=%0d", pix.b); end
      if (sof !== (x == 0 && y == 0)) begin failures++; $display("FAIL: sof=%b at %0d,%0d", sof, x, y); end
      if (eol !== (x == H - 1)) begin failures++; $display("FAIL: eol=%b at %0d,%0d", eol, x, y); end
      if (en && ready) begin
        steps++;
        x++;
        if (x == H) begin
          x = 0; y++;
          if (y == V) begin y = 0; frame++; end
        end
      end
    end
    checks++;
    if (frame < 3) begin failures++; $display("FAIL: only %0d frames", frame); end
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
