// tb_width_conv_in: self-checking test of width_conv_in (24 -> 32 bits).
// A reference keeps the accepted inputs as a queue of bits, first input in
// front, and expects a 32-bit word, in the same cycle, whenever 32 or more
// bits are queued. Inputs are offered at random and full is raised at
// random; an input offered while full is high must leave no trace. A
// directed start checks the four-pixels-into-three-words layout by hand.
module tb_width_conv_in;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [23:0] din;
  logic        din_en, full;
  logic        wr_en;
  logic [31:0] wr_data;
  bit          q[$];        // bits accepted but not yet written, LSB first
  int          words = 0;

  width_conv_in dut (.clk(clk), .rst_n(rst_n), .din(din), .din_en(din_en),
                     .full(full), .wr_en(wr_en), .wr_data(wr_data));

  always #5 clk = ~clk;

  // One cycle: apply inputs, check the combinational outputs, update the
  // reference and let the clock edge pass.
  task automatic cycle(input logic [23:0] d, input logic en, input logic f,
                       input logic [31:0] hand = '0, input bit use_hand = 0);
    logic [31:0] exp;
    bit          exp_en;
    din = d; din_en = en; full = f;
    #2;
    if (en && !f) for (int i = 0; i < 24; i++) q.push_back(d[i]);
    exp_en = (en && !f) && (q.size() >= 32);
    checks++;
    if (wr_en !== exp_en) begin
      failures++; $display("FAIL: wr_en=%b expected %b", wr_en, exp_en);
    end
    if (exp_en) begin
      for (int i = 0; i < 32; i++) exp[i] = q.pop_front();
      checks++;
      if (wr_data !== exp) begin
        failures++; $display("FAIL: wr_data=%h expected %h", wr_data, exp);
      end
      if (use_hand) begin
        checks++;
        if (wr_data !== hand) begin
          failures++; $display("FAIL: wr_data=%h expected %h (layout)", wr_data, hand);
        end
      end
      words++;
    end
    @(posedge clk); #1;
  endtask

  initial begin
    din = '0; din_en = 0; full = 0;
    #12 rst_n = 1;
    @(posedge clk); #1;
    // four pixels p0..p3 give three words
    cycle(24'hA2A1A0, 1, 0);
    cycle(24'hB2B1B0, 1, 0, 32'hB0A2A1A0, 1);
    cycle(24'hC2C1C0, 1, 1);                        // refused: full
    cycle(24'hC2C1C0, 1, 0, 32'hC1C0B2B1, 1);
    cycle(24'hD2D1D0, 0, 0);                        // idle
    cycle(24'hD2D1D0, 1, 0, 32'hD2D1D0C2, 1);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: residue left after 4 pixels"); end
    for (int n = 0; n < 2000; n++)
      cycle(24'($urandom), 1'($urandom), ($urandom % 4) == 0);
    checks++;
    if (words < 500) begin failures++; $display("FAIL: only %0d words", words); end
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
