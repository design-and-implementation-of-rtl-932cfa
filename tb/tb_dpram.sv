// tb_dpram: self-checking test of dpram (32-bit x 128 words, 4 read
// addresses, combinational read).
// The write side fills the whole RAM with random words, kept in a
// reference array; then random address groups, half of them four
// consecutive aligned words as the FIFO uses it, are read and compared.
// Part of the RAM is rewritten to see new data replace old, and a write
// must not disturb other addresses.
module tb_dpram;
  int checks = 0, failures = 0;
  logic wclk = 0;
  logic        we;
  logic [6:0]  waddr;
  logic [31:0] wdata;
  logic [6:0]  raddr [4];
  logic [31:0] rdata [4];
  logic [31:0] ref_mem [128];

  dpram dut (.wclk(wclk), .we(we), .waddr(waddr), .wdata(wdata),
             .raddr(raddr), .rdata(rdata));

  always #5 wclk = ~wclk;

  task automatic write_word(input int a, input logic [31:0] v, input bit en = 1);
    @(negedge wclk);
    we = en; waddr = 7'(a); wdata = v;
    @(posedge wclk); #1;
    we = 0;
    if (en) ref_mem[a] = v;
  endtask

  task automatic read_check(input bit consecutive);
    int base;
    base = $urandom % 128;
    for (int k = 0; k < 4; k++)
      raddr[k] = consecutive ? 7'((base & ~3) + k) : 7'($urandom);
    #1;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (rdata[k] !== ref_mem[raddr[k]]) begin
        failures++; $display("FAIL: rdata[%0d] at %0d = %h expected %h", k, raddr[k], rdata[k], ref_mem[raddr[k]]);
      end
    end
  endtask

  initial begin
    we = 0; waddr = '0; wdata = '0;
    for (int k = 0; k < 4; k++) raddr[k] = '0;
    for (int a = 0; a < 128; a++) write_word(a, $urandom);
    for (int n = 0; n < 200; n++) read_check(n % 2 == 0);
    for (int a = 0; a < 128; a += 3) write_word(a, $urandom);
    for (int a = 1; a < 128; a += 5) write_word(a, $urandom, 0);   // we low
    for (int n = 0; n < 200; n++) read_check(n % 2 == 1);
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
