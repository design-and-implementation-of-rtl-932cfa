// vcam: virtual camera, the pixel source of the system.
//
// Produces an endless sequence of frames of H_RES x V_RES RGB888 pixels in
// raster order. The picture is a test pattern that a receiver can predict
// from the pixel position alone:
//   r = x[7:0], g = y[7:0], b = x[7:0] ^ y[7:0] ^ frame[7:0]
// Pixels are offered with a valid/ready handshake: pix_valid is high while
// en is high, and the pixel advances on a clk edge where pix_valid and
// ready are both high (ready is the FIFO's "not full"). A pixel is held,
// never dropped, while ready is low. sof marks the first pixel of a frame,
// eol the last pixel of a line. That the source is a virtual camera with
// 24-bit RGB888 output is the document's; the pattern, the frame size and
// the handshake are this design's choices. Reset is asynchronous, active
// low, and starts at pixel (0,0) of frame 0.
module vcam #(
  parameter int unsigned H_RES = 640,
  parameter int unsigned V_RES = 480,
  localparam int unsigned XW   = $clog2(H_RES),
  localparam int unsigned YW   = $clog2(V_RES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             ready,
  output fifo_pkg::rgb888_t pix,
  output logic             pix_valid,
  output logic             sof,
  output logic             eol
);

  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic [7:0]    frame;
  logic          step;

  always_comb begin
    pix_valid = en;
    step      = pix_valid && ready;
    pix.r     = 8'(x);
    pix.g     = 8'(y);
    pix.b     = 8'(x) ^ 8'(y) ^ frame;
    sof       = (x == '0) && (y == '0);
    eol       = x == XW'(H_RES - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x     <= '0;
      y     <= '0;
      frame <= '0;
    end else if (step) begin
      if (x == XW'(H_RES - 1)) begin
        x <= '0;
        if (y == YW'(V_RES - 1)) begin
          y     <= '0;
          frame <= frame + 8'd1;
        end else begin
          y <= y + YW'(1);
        end
      end else begin
        x <= x + XW'(1);
      end
    end
  end

endmodule
