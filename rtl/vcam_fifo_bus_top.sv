// vcam_fifo_bus_top: the complete data path from camera to bus.
//
// A virtual camera (vcam) in the din_clk domain streams 24-bit RGB888
// pixels into the width-adjustable asynchronous FIFO (asyc_fifo), which
// packs them into 32-bit RAM words and hands out 128-bit words in the
// dout_clk domain. The FIFO's prog_full, raised once 64 words (16 bus
// beats) are stored, is synchronised into the dout_clk domain and starts
// a 16-beat burst write of the bus module (avalon_burst_master) on the
// 128-bit Avalon bus, whose slave (the host side) is outside this design
// and connects through the avm_* ports. The camera is stalled, not
// dropped, while the FIFO is full. cam_en lets the camera run.
// Each clock domain has its own asynchronous active-low reset; assert both
// together. full, prog_full and empty are brought out for observation.
module vcam_fifo_bus_top #(
  parameter int unsigned H_RES       = 640,
  parameter int unsigned V_RES       = 480,
  parameter int unsigned DEPTH       = fifo_pkg::DEPTH,
  parameter int unsigned PROG_FULL_N = fifo_pkg::PROG_FULL_N,
  parameter int unsigned BURST_LEN   = fifo_pkg::BURST_LEN,
  localparam int unsigned DATA_W     = fifo_pkg::OUT_W,
  localparam int unsigned BCW        = $clog2(BURST_LEN) + 1
) (
  // camera / write clock domain
  input  logic                din_clk,
  input  logic                din_rst_n,
  input  logic                cam_en,
  output logic                full,
  output logic                prog_full,
  // bus / read clock domain
  input  logic                dout_clk,
  input  logic                dout_rst_n,
  output logic                empty,
  output logic [31:0]         avm_address,
  output logic [BCW-1:0]      avm_burstcount,
  output logic                avm_write,
  output logic [DATA_W-1:0]   avm_writedata,
  output logic [DATA_W/8-1:0] avm_byteenable,
  input  logic                avm_waitrequest
);

  fifo_pkg::rgb888_t     pix;
  logic                  pix_valid;
  logic                  dout_en, prog_full_sync;
  logic [DATA_W-1:0]     dout;

  vcam #(.H_RES(H_RES), .V_RES(V_RES)) u_vcam (
    .clk(din_clk), .rst_n(din_rst_n), .en(cam_en), .ready(!full),
    .pix(pix), .pix_valid(pix_valid), .sof(), .eol()
  );

  asyc_fifo #(
    .IN_W(fifo_pkg::IN_W), .MEM_W(fifo_pkg::MEM_W), .OUT_W(DATA_W),
    .DEPTH(DEPTH), .PROG_FULL_N(PROG_FULL_N)
  ) u_fifo (
    .din_clk(din_clk), .din_rst_n(din_rst_n), .din(pix), .din_en(pix_valid),
    .full(full), .prog_full(prog_full),
    .dout_clk(dout_clk), .dout_rst_n(dout_rst_n), .dout_en(dout_en),
    .dout(dout), .empty(empty)
  );

  sync_2ff #(.W(1)) u_sync_pf (
    .clk(dout_clk), .rst_n(dout_rst_n), .d(prog_full), .q(prog_full_sync)
  );

  avalon_burst_master #(.DATA_W(DATA_W), .BURST_LEN(BURST_LEN), .ADDR_W(32)) u_bus (
    .clk(dout_clk), .rst_n(dout_rst_n), .burst_ready(prog_full_sync),
    .fifo_empty(empty), .fifo_rd(dout_en), .fifo_dout(dout),
    .avm_address(avm_address), .avm_burstcount(avm_burstcount),
    .avm_write(avm_write), .avm_writedata(avm_writedata),
    .avm_byteenable(avm_byteenable), .avm_waitrequest(avm_waitrequest)
  );

endmodule
