// sync_2ff: two-stage flip-flop synchroniser.
//
// Carries a W-bit value that changes in at most one bit per source clock
// (a Gray-coded pointer, or a single level signal) into the clock domain
// of clk. The first stage may go metastable; the second gives it a full
// clock period to settle. The output lags the input by two clk edges,
// which only makes the FIFO flags conservative. Reset (asynchronous,
// active low) clears both stages to zero, the pointers' reset value.
module sync_2ff #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
