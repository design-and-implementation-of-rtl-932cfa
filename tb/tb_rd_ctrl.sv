// tb_rd_ctrl: self-checking test of rd_ctrl (128 words, reads of 4 words).
// The testbench plays the write side, advancing a Gray-coded word pointer
// by at most one word per cycle and never more than 128 words ahead of the
// reads, and issues random read requests. It checks rd_fire, the row
// address, the Gray read pointer and empty against its own counts: empty
// must be high exactly when fewer than 4 unread words are stored.
module tb_rd_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic       rd_req;
  logic [7:0] wptr_gray_sync;
  logic       rd_fire;
  logic [4:0] row;
  logic [5:0] rptr_gray;
  logic       empty;

  int unsigned wcount = 0, rcount = 0;
  int          reads = 0, empty_seen = 0;

  rd_ctrl dut (.clk(clk), .rst_n(rst_n), .rd_req(rd_req),
               .wptr_gray_sync(wptr_gray_sync), .rd_fire(rd_fire), .row(row),
               .rptr_gray(rptr_gray), .empty(empty));

  always #5 clk = ~clk;

  function automatic logic [7:0] gray8(input int unsigned v);
    logic [7:0] b = 8'(v);
    return b ^ (b >> 1);
  endfunction

  task automatic cycle(input bit want_write, input bit want_read);
    bit exp_empty, fire;
    @(negedge clk);
    if (want_write && (wcount - 4 * rcount) < 128) wcount++;
    wptr_gray_sync = gray8(wcount % 256);
    rd_req = want_read;
    #1;
    checks += 2;
    if (rd_fire !== (rd_req && !empty)) begin
      failures++; $display("FAIL: rd_fire=%b", rd_fire);
    end
    if (row !== 5'(rcount)) begin
      failures++; $display("FAIL: row=%0d expected %0d", row, rcount % 32);
    end
    fire = rd_fire;
    @(posedge clk); #1;
    if (fire) begin
      rcount++;
      reads++;
    end
    exp_empty = (wcount - 4 * rcount) < 4;
    checks += 2;
    if (empty !== exp_empty) begin
      failures++; $display("FAIL: empty=%b with %0d words stored", empty, wcount - 4 * rcount);
    end
    if (rptr_gray !== 6'(gray8(rcount % 64))) begin
      failures++; $display("FAIL: rptr_gray=%h", rptr_gray);
    end
    if (empty) empty_seen++;
  endtask

  initial begin
    rd_req = 0; wptr_gray_sync = '0;
    #12 rst_n = 1;
    @(posedge clk); #1;
    checks++;
    if (empty !== 1'b1) begin failures++; $display("FAIL: not empty after reset"); end
    for (int n = 0; n < 3; n++) cycle(1, 1);       // 3 words: still empty
    for (int n = 0; n < 200; n++) cycle(1, 0);     // fill up
    for (int n = 0; n < 5000; n++) cycle($urandom % 2, $urandom % 5 == 0);
    for (int n = 0; n < 100; n++) cycle(0, 1);     // drain
    checks++;
    if (reads < 300 || empty_seen == 0) begin
      failures++; $display("FAIL: reads=%0d empty_seen=%0d", reads, empty_seen);
    end
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
