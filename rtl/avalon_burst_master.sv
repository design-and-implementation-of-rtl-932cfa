// avalon_burst_master: the bus module, moves FIFO output words onto a
// 128-bit Avalon memory-mapped bus as burst writes.
//
// The bus writes bursts of BURST_LEN (16) beats, so a burst is started
// only when the FIFO reports enough data: burst_ready is the FIFO's
// prog_full (64 stored 32-bit words = 16 x 128 bits), already synchronised
// into this clock domain. A burst holds avm_address and avm_burstcount
// constant from its first beat to its last; the address then advances by
// BURST_LEN * DATA_W/8 bytes. Beats are fetched from the FIFO one ahead:
// fifo_rd pops a word whenever the FIFO is not empty, beats of this burst
// are still to be fetched, and the word on fifo_dout has been sent or none
// is held. The popped word appears on fifo_dout after one clock and is
// driven straight onto avm_writedata; avm_write is high while such a word
// is held and stays high, with stable data, while avm_waitrequest is high.
// If the FIFO runs empty inside a burst (prog_full is sampled from a
// conservative count), avm_write drops between beats until data arrives,
// which Avalon allows. One beat per clock is sustained.
// Bursts of 16 on a 128-bit Avalon bus and the prog_full trigger follow
// the document; addressing and the fetch scheme are this design's own.
// Reset is asynchronous, active low.
module avalon_burst_master #(
  parameter int unsigned DATA_W    = fifo_pkg::OUT_W,
  parameter int unsigned BURST_LEN = fifo_pkg::BURST_LEN,
  parameter int unsigned ADDR_W    = 32,
  parameter logic [ADDR_W-1:0] BASE_ADDR = '0,
  localparam int unsigned BCW      = $clog2(BURST_LEN) + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                burst_ready,
  // FIFO read side
  input  logic                fifo_empty,
  output logic                fifo_rd,
  input  logic [DATA_W-1:0]   fifo_dout,
  // Avalon-MM master, write only
  output logic [ADDR_W-1:0]   avm_address,
  output logic [BCW-1:0]      avm_burstcount,
  output logic                avm_write,
  output logic [DATA_W-1:0]   avm_writedata,
  output logic [DATA_W/8-1:0] avm_byteenable,
  input  logic                avm_waitrequest
);

  typedef enum logic {S_IDLE, S_BURST} state_t;

  localparam logic [ADDR_W-1:0] BURST_BYTES = ADDR_W'(BURST_LEN * DATA_W / 8);

  state_t         state;
  logic [BCW-1:0] fetch_left, send_left;
  logic           held;      // fifo_dout holds a beat not yet sent
  logic           accept;

  always_comb begin
    avm_write      = (state == S_BURST) && held;
    accept         = avm_write && !avm_waitrequest;
    fifo_rd        = (state == S_BURST) && (fetch_left != '0) && !fifo_empty &&
                     (!held || accept);
    avm_writedata  = fifo_dout;
    avm_byteenable = '1;
    avm_burstcount = BCW'(BURST_LEN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      fetch_left  <= '0;
      send_left   <= '0;
      held        <= 1'b0;
      avm_address <= BASE_ADDR;
    end else begin
      if (fifo_rd)     held <= 1'b1;
      else if (accept) held <= 1'b0;
      case (state)
        S_IDLE: begin
          if (burst_ready) begin
            state      <= S_BURST;
            fetch_left <= BCW'(BURST_LEN);
            send_left  <= BCW'(BURST_LEN);
          end
        end
        S_BURST: begin
          fetch_left <= fetch_left - BCW'(fifo_rd);
          send_left  <= send_left - BCW'(accept);
          if (accept && send_left == BCW'(1)) begin
            state       <= S_IDLE;
            avm_address <= avm_address + BURST_BYTES;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Avalon: a write stalled by waitrequest keeps its command and data.
  a_hold_on_wait: assert property (
    @(posedge clk) disable iff (!rst_n)
    avm_write && avm_waitrequest |=>
      avm_write && $stable(avm_writedata) && $stable(avm_address)
  ) else $error("avalon_burst_master: write changed under waitrequest");

endmodule
