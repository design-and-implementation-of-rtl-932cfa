// tb_asyc_fifo: self-checking test of the whole asynchronous FIFO
// (24-bit in, 128-bit out, 128 words of 32 bits, prog_full at 64 words).
// Write clock 10 ns; read clock 14 ns, later 6 ns. A reference keeps every accepted
// pixel as a queue of bits, first pixel in the least significant bits,
// and each 128-bit read must return the next 128 bits of that stream.
//   Phase 1, filling: 200 random pixels are offered with no reads. Exactly
//     171 must be accepted (171 x 24 bits is the first count to fill 128
//     words); prog_full must rise in the cycle after pixel 86 (64 words)
//     and full after pixel 171, and empty must fall no later than 4 read
//     clocks after the 4th word is written.
//   Phase 2, draining: 32 reads, each checked, then empty.
//   Phase 3, random traffic: writes with random enable (9 cycles in 16),
//     in three parts: (a) read clock slower than the write clock, reads
//     always enabled; (b) read clock faster (6 ns), reads always enabled;
//     (c) fast read clock, reads one cycle in 24, so that the FIFO fills.
//     Every 128-bit word is checked; full must occur in (c) and empty in
//     (a) and (b).
module tb_asyc_fifo;
  int checks = 0, failures = 0;
  logic din_clk = 0, dout_clk = 0, din_rst_n = 0, dout_rst_n = 0;
  logic [23:0]  din;
  logic         din_en, full, prog_full, dout_en, empty;
  logic [127:0] dout;

  bit   stream[$];
  int   accepted = 0, reads = 0, phase = 0, full_cnt = 0, empty_cnt = 0;
  int   word4_time = -1;
  bit   read_mode_random = 0;
  int   sub = 0;                      // part of phase 3: 0 = a, 1 = b, 2 = c
  int   full_by[3] = '{0, 0, 0}, empty_by[3] = '{0, 0, 0};
  int   rd_half = 7;
  bit   fill_done = 0;

  asyc_fifo dut (
    .din_clk(din_clk), .din_rst_n(din_rst_n), .din(din), .din_en(din_en),
    .full(full), .prog_full(prog_full),
    .dout_clk(dout_clk), .dout_rst_n(dout_rst_n), .dout_en(dout_en),
    .dout(dout), .empty(empty));

  always #5 din_clk = ~din_clk;
  always #(rd_half) dout_clk = ~dout_clk;

  function automatic int words_of(input int pixels);
    return (pixels * 24) / 32;
  endfunction

  // write side
  initial begin
    bit acc;
    din = '0; din_en = 0;
    #20 din_rst_n = 1; dout_rst_n = 1;
    phase = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge din_clk);
      din = 24'($urandom); din_en = 1;
      acc = !full;
      @(posedge din_clk); #1;
      if (acc) begin
        accepted++;
        for (int i = 0; i < 24; i++) stream.push_back(din[i]);
        if (words_of(accepted) >= 4 && word4_time < 0) word4_time = $time;
      end
      checks += 2;
      if (prog_full !== (words_of(accepted) >= 64)) begin
        failures++; $display("FAIL: prog_full=%b after %0d pixels", prog_full, accepted);
      end
      if (full !== (words_of(accepted) >= 128)) begin
        failures++; $display("FAIL: full=%b after %0d pixels", full, accepted);
      end
    end
    din_en = 0;
    fill_done = 1;
    checks++;
    if (accepted != 171) begin failures++; $display("FAIL: %0d pixels accepted, expected 171", accepted); end
    wait (phase == 3);
    for (int n = 0; n < 30000; n++) begin
      @(negedge din_clk);
      din = 24'($urandom);
      din_en = ($urandom % 16) <= 8;
      acc = din_en && !full;
      if (full) begin full_cnt++; full_by[sub]++; end
      @(posedge din_clk); #1;
      if (acc) begin
        accepted++;
        for (int i = 0; i < 24; i++) stream.push_back(din[i]);
      end
    end
    din_en = 0;
    phase = 4;
  end

  // read side
  initial begin
    bit fire;
    logic [127:0] exp;
    int empty_fall_checked = 0;
    dout_en = 0;
    wait (phase == 1);
    // empty must fall within 4 read clocks of the 4th word
    while (!empty_fall_checked) begin
      @(posedge dout_clk); #1;
      if (word4_time >= 0 && !empty) begin
        checks++;
        if ($time - word4_time > 4 * 14) begin
          failures++; $display("FAIL: empty fell %0t after the 4th word", $time - word4_time);
        end
        empty_fall_checked = 1;
      end else if (word4_time >= 0 && $time - word4_time > 10 * 14) begin
        checks++; failures++; $display("FAIL: empty never fell");
        empty_fall_checked = 1;
      end
    end
    wait (fill_done);
    repeat (5) @(posedge dout_clk);
    phase = 2;
    forever begin
      @(negedge dout_clk);
      if (phase == 3) dout_en = read_mode_random ? ($urandom % 24 == 0) : 1'b1;
      else dout_en = phase >= 2;
      fire = dout_en && !empty;
      if (empty) begin empty_cnt++; if (phase == 3) empty_by[sub]++; end
      @(posedge dout_clk); #1;
      if (fire) begin
        reads++;
        checks++;
        if (stream.size() < 128) begin
          failures++; $display("FAIL: read with only %0d bits stored", stream.size());
        end else begin
          for (int i = 0; i < 128; i++) exp[i] = stream.pop_front();
          if (dout !== exp) begin
            failures++; $display("FAIL: read %0d dout=%h expected %h", reads, dout, exp);
          end
        end
      end
      if (phase == 2 && reads == 32) begin
        repeat (2) @(posedge dout_clk);
        #1;
        checks++;
        if (!empty) begin failures++; $display("FAIL: not empty after 32 reads"); end
        dout_en = 0;
        phase = 3;
      end
      if (phase == 3 && sub == 0 && accepted > 6000) begin sub = 1; rd_half = 3; end
      if (phase == 3 && sub == 1 && accepted > 12000) begin sub = 2; read_mode_random = 1; end
      if (phase == 4 && stream.size() < 128) begin
        repeat (5) @(posedge dout_clk);
        checks += 2;
        if (!empty) begin failures++; $display("FAIL: not empty at the end"); end
        if (full_by[2] == 0 || empty_by[0] == 0 || empty_by[1] == 0 || reads < 1000) begin
          failures++;
          $display("FAIL: full in part c %0d, empty in parts a/b %0d/%0d, reads %0d",
                   full_by[2], empty_by[0], empty_by[1], reads);
        end
        $display("pixels=%0d reads=%0d full cycles=%0d (a/b/c %0d/%0d/%0d) empty cycles=%0d (a/b/c %0d/%0d/%0d)",
                 accepted, reads, full_cnt, full_by[0], full_by[1], full_by[2],
                 empty_cnt, empty_by[0], empty_by[1], empty_by[2]);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
