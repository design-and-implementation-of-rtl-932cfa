// tb_vcam_fifo_bus_top: end-to-end test of the camera -> FIFO -> Avalon
// bus system at its default size (640 x 480 RGB888 frame, 128-word FIFO,
// 128-bit bus, bursts of 16).
// Camera clock 10 ns, bus clock 12 ns. The testbench is the Avalon slave
// (the host side): it raises waitrequest at random, and for long stretches
// now and then, so that the FIFO fills and the camera stalls. The camera
// enable is toggled at random. Every accepted beat is split into bytes,
// and every three bytes are compared with the camera's test pattern for
// the next pixel position (r = x, g = y, b = x ^ y ^ frame). Each burst
// must carry burstcount 16 and a constant address that advances by 256
// bytes per burst. The run ends after one whole frame, 640 x 480 x 3
// bytes = 57600 beats = 3600 bursts. Counted, and each required at least
// once: prog_full rising (each rise can start a burst), camera stalls on
// full, beats held by waitrequest, and bus-clock cycles with the FIFO
// empty. Bursts that pause because the FIFO ran dry are counted too; they
// need a stale prog_full and are rare, so they are not required.
module tb_vcam_fifo_bus_top;
  localparam int H = 640, V = 480;
  localparam int FRAME_BEATS = H * V * 3 / 16;

  int checks = 0, failures = 0;
  logic din_clk = 0, dout_clk = 0, din_rst_n = 0, dout_rst_n = 0;
  logic cam_en, full, prog_full, empty;
  logic [31:0]  avm_address;
  logic [4:0]   avm_burstcount;
  logic         avm_write;
  logic [127:0] avm_writedata;
  logic [15:0]  avm_byteenable;
  logic         avm_waitrequest;

  int unsigned beats = 0, bursts = 0, in_burst = 0, pixel = 0;
  int unsigned full_stalls = 0, wait_stalls = 0, burst_gaps = 0, pf_rises = 0;
  int unsigned empty_cycles = 0;
  logic [31:0] burst_addr;
  logic [7:0]  bytes[$];
  bit          prev_pf = 0;

  vcam_fifo_bus_top dut (
    .din_clk(din_clk), .din_rst_n(din_rst_n), .cam_en(cam_en),
    .full(full), .prog_full(prog_full),
    .dout_clk(dout_clk), .dout_rst_n(dout_rst_n), .empty(empty),
    .avm_address(avm_address), .avm_burstcount(avm_burstcount),
    .avm_write(avm_write), .avm_writedata(avm_writedata),
    .avm_byteenable(avm_byteenable), .avm_waitrequest(avm_waitrequest));

  always #5 din_clk = ~din_clk;
  always #6 dout_clk = ~dout_clk;

  // camera side: random enable, count stalls and prog_full rises
  initial begin
    cam_en = 0;
    #30 din_rst_n = 1; dout_rst_n = 1;
    forever begin
      @(negedge din_clk);
      cam_en = ($urandom % 8) != 0;
      if (cam_en && full) full_stalls++;
      if (prog_full && !prev_pf) pf_rises++;
      prev_pf = prog_full;
    end
  end

  task automatic check_pixels();
    int x, y, f;
    logic [7:0] b, g, r;
    while (bytes.size() >= 3) begin
      b = bytes.pop_front(); g = bytes.pop_front(); r = bytes.pop_front();
      x = pixel % H; y = (pixel / H) % V; f = pixel / (H * V);
      checks++;
      if (r !== 8'(x) || g !== 8'(y) || b !== (8'(x) ^ 8'(y) ^ 8'(f))) begin
        failures++;
        if (failures < 10) $display("FAIL: pixel %0d (%0d,%0d) got r=%0d g=%0d b=%0d", pixel, x, y, r, g, b);
      end
      pixel++;
    end
  endtask

  // host side: Avalon slave
  initial begin
    bit wr, waitr;
    int slow = 0;
    avm_waitrequest = 0;
    forever begin
      @(negedge dout_clk);
      if (slow > 0) slow--;
      else if ($urandom % 4000 == 0) slow = 300 + $urandom % 600;
      avm_waitrequest = (slow > 0) || ($urandom % 4 == 0);
      if (empty) empty_cycles++;
      #2;
      wr = avm_write; waitr = avm_waitrequest;
      if (wr) begin
        checks += 3;
        if (avm_burstcount !== 5'd16) begin failures++; $display("FAIL: burstcount=%0d", avm_burstcount); end
        if (avm_byteenable !== '1) begin failures++; $display("FAIL: byteenable=%h", avm_byteenable); end
        if (in_burst == 0) burst_addr = avm_address;
        if (avm_address !== burst_addr || burst_addr !== 32'(bursts * 256)) begin
          failures++; $display("FAIL: address %h in burst %0d", avm_address, bursts);
        end
        if (waitr) wait_stalls++;
      end else if (in_burst != 0) burst_gaps++;
      @(posedge dout_clk);
      if (wr && !waitr) begin
        for (int i = 0; i < 16; i++) bytes.push_back(avm_writedata[8*i +: 8]);
        check_pixels();
        beats++;
        in_burst++;
        if (in_burst == 16) begin in_burst = 0; bursts++; end
        if (beats == FRAME_BEATS) begin
          checks += 6;
          if (pixel != H * V) begin failures++; $display("FAIL: %0d pixels checked", pixel); end
          if (bursts != FRAME_BEATS / 16) begin failures++; $display("FAIL: %0d bursts", bursts); end
          if (pf_rises == 0) begin failures++; $display("FAIL: prog_full never rose"); end
          if (full_stalls == 0) begin failures++; $display("FAIL: camera never stalled on full"); end
          if (wait_stalls == 0) begin failures++; $display("FAIL: waitrequest never held a beat"); end
          if (empty_cycles == 0) begin failures++; $display("FAIL: the FIFO was never empty"); end
          $display("frame done: %0d beats, %0d bursts, prog_full rises %0d, camera stalls %0d, waitrequest stalls %0d, empty cycles %0d, burst pauses %0d",
                   beats, bursts, pf_rises, full_stalls, wait_stalls, empty_cycles, burst_gaps);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog after %0d beats", beats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
