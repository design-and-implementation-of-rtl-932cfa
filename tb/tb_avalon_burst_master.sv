// tb_avalon_burst_master: self-checking test of avalon_burst_master
// (128-bit data, bursts of 16).
// The testbench models the FIFO read side (a queue of numbered words with
// a one-cycle registered dout and an empty flag) and the Avalon slave
// (random waitrequest). It checks that every accepted beat carries the
// next word in order, that each burst has burstcount 16, a constant
// address that advances by 256 bytes per burst and exactly 16 beats, that
// the master never pops an empty FIFO, and, in a first directed burst with
// the FIFO pre-filled and no waitrequest, that 16 beats leave in 16
// consecutive cycles. burst_ready is high while 16 or more words are
// queued, or at random, so bursts that run the FIFO dry also occur.
module tb_avalon_burst_master;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic         burst_ready, fifo_empty, fifo_rd;
  logic [127:0] fifo_dout;
  logic [31:0]  avm_address;
  logic [4:0]   avm_burstcount;
  logic         avm_write;
  logic [127:0] avm_writedata;
  logic [15:0]  avm_byteenable;
  logic         avm_waitrequest;

  logic [127:0] q[$];
  int unsigned  produced = 0, beats = 0, bursts = 0, in_burst = 0;
  int unsigned  gaps = 0, waits = 0, first_beat_cycle = 0, cycle_no = 0;
  logic [31:0]  burst_addr;
  bit           noise = 0, producer_on = 0;

  avalon_burst_master dut (
    .clk(clk), .rst_n(rst_n), .burst_ready(burst_ready),
    .fifo_empty(fifo_empty), .fifo_rd(fifo_rd), .fifo_dout(fifo_dout),
    .avm_address(avm_address), .avm_burstcount(avm_burstcount),
    .avm_write(avm_write), .avm_writedata(avm_writedata),
    .avm_byteenable(avm_byteenable), .avm_waitrequest(avm_waitrequest));

  always #5 clk = ~clk;

  function automatic logic [127:0] word_of(input int unsigned n);
    return {n, ~n, n * 3, n ^ 32'hA5A5_A5A5};
  endfunction

  initial begin
    bit rd, wr, wait_now;
    burst_ready = 0; fifo_empty = 1; fifo_dout = '0; avm_waitrequest = 0;
    for (int i = 0; i < 32; i++) q.push_back(word_of(produced++));
    #12 rst_n = 1;
    forever begin
      @(negedge clk);
      cycle_no++;
      if (producer_on && ($urandom % 3 == 0)) q.push_back(word_of(produced++));
      fifo_empty = q.size() == 0;
      burst_ready = (q.size() >= 16) || (noise && ($urandom % 8 == 0));
      avm_waitrequest = noise && ($urandom % 4 == 0);
      #3;
      rd = fifo_rd; wr = avm_write; wait_now = avm_waitrequest;
      checks++;
      if (avm_byteenable !== '1) begin failures++; $display("FAIL: byteenable"); end
      if (rd && fifo_empty) begin failures++; $display("FAIL: pop while empty"); end
      if (wr) begin
        checks += 2;
        if (avm_burstcount !== 5'd16) begin failures++; $display("FAIL: burstcount=%0d", avm_burstcount); end
        if (in_burst == 0) burst_addr = avm_address;
        if (avm_address !== burst_addr || burst_addr !== 32'(bursts * 256)) begin
          failures++; $display("FAIL: address=%h in burst %0d", avm_address, bursts);
        end
        if (wait_now) waits++;
      end else if (in_burst != 0) gaps++;
      @(posedge clk);
      if (wr && !wait_now) begin
        checks++;
        if (avm_writedata !== word_of(beats)) begin
          failures++; $display("FAIL: beat %0d data %h", beats, avm_writedata);
        end
        if (in_burst == 0) first_beat_cycle = cycle_no;
        beats++;
        in_burst++;
        if (in_burst == 16) begin
          if (bursts == 0) begin
            checks++;
            if (cycle_no - first_beat_cycle != 15) begin
              failures++; $display("FAIL: first burst took %0d cycles", cycle_no - first_beat_cycle + 1);
            end
          end
          in_burst = 0;
          bursts++;
        end
      end
      #1;
      if (rd) fifo_dout = q.pop_front();
    end
  end

  initial begin
    wait (bursts == 2);
    noise = 1; producer_on = 1;
    wait (bursts == 60);
    checks += 2;
    if (gaps == 0 || waits == 0) begin
      failures++; $display("FAIL: gaps=%0d waits=%0d, stalls not exercised", gaps, waits);
    end
    if (in_burst != 0 && in_burst >= 16) begin failures++; $display("FAIL: burst overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
