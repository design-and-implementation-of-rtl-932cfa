// tb_wr_ctrl: self-checking test of wr_ctrl (128 words, read pointer in
// units of 4 words, prog_full at 64).
// The testbench plays both the packer (writing words only while full is
// low) and the read side (advancing a read pointer of 4-word rows, Gray
// coded, only over rows that are completely written). After each clock
// edge it checks waddr, the Gray write pointer, full and prog_full against
// counts it keeps itself. A fill phase without reads must reach full
// after exactly 128 words and prog_full after exactly 64.
module tb_wr_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic       wr_en;
  logic [5:0] rptr_gray_sync;
  logic [6:0] waddr;
  logic [7:0] wptr_gray;
  logic       full, prog_full;

  int unsigned wcount = 0, rcount = 0;   // words written, rows read
  int          full_seen = 0, pf_seen = 0;

  wr_ctrl dut (.clk(clk), .rst_n(rst_n), .wr_en(wr_en),
               .rptr_gray_sync(rptr_gray_sync), .waddr(waddr),
               .wptr_gray(wptr_gray), .full(full), .prog_full(prog_full));

  always #5 clk = ~clk;

  function automatic logic [7:0] gray8(input int unsigned v);
    logic [7:0] b = 8'(v);
    return b ^ (b >> 1);
  endfunction

  task automatic cycle(input bit want_write, input bit want_read);
    int unsigned used;
    @(negedge clk);
    checks++;
    if (waddr !== 7'(wcount)) begin
      failures++; $display("FAIL: waddr=%0d expected %0d", waddr, wcount % 128);
    end
    if (want_read && (wcount - 4 * rcount) >= 4) rcount++;
    rptr_gray_sync = 6'(gray8(rcount % 64));
    wr_en = want_write && !full;
    @(posedge clk); #1;
    if (wr_en) wcount++;
    used = wcount - 4 * rcount;
    checks += 3;
    if (wptr_gray !== gray8(wcount % 256)) begin
      failures++; $display("FAIL: wptr_gray=%h expected %h", wptr_gray, gray8(wcount % 256));
    end
    if (full !== (used >= 128)) begin
      failures++; $display("FAIL: full=%b with %0d words used", full, used);
    end
    if (prog_full !== (used >= 64)) begin
      failures++; $display("FAIL: prog_full=%b with %0d words used", prog_full, used);
    end
    if (full) full_seen++;
    if (prog_full) pf_seen++;
  endtask

  initial begin
    wr_en = 0; rptr_gray_sync = '0;
    #12 rst_n = 1;
    // fill without reads: prog_full exactly after word 64, full after 128
    for (int n = 1; n <= 140; n++) begin
      cycle(1, 0);
      if (n == 63 || n == 64 || n == 127 || n == 128) begin
        checks++;
        if (prog_full !== (n >= 64) || full !== (n >= 128)) begin
          failures++; $display("FAIL: after %0d words prog_full=%b full=%b", n, prog_full, full);
        end
      end
    end
    checks++;
    if (wcount != 128) begin failures++; $display("FAIL: %0d words written, expected 128", wcount); end
    // random traffic, several pointer wraps
    for (int n = 0; n < 4000; n++) cycle($urandom % 3 != 0, $urandom % 4 == 0);
    // drain
    for (int n = 0; n < 200; n++) cycle(0, 1);
    checks++;
    if (full_seen == 0 || pf_seen == 0) begin failures++; $display("FAIL: flags never rose"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
