// gauss_filter2d: 5x5 Gaussian smoothing as two equal 1D convolvers.
//
// The first gauss_conv1d runs along the line (delay of one pixel per tap),
// the second runs down the columns with delay elements one line long, so the
// memory of the vertical convolver holds the intermediate (horizontally
// smoothed) image. Each convolver divides by 12, so the result is the
// separable (1,3,4,3,1)x(1,3,4,3,1)/144 kernel with truncation after each
// pass, and is again an 8-bit pixel.
//
// Timing, with x[k] the input on enable k and h[k] the horizontal result
// latched on enable k:
//   h[k] = (x[k]+3x[k-1]+4x[k-2]+3x[k-3]+x[k-4]) / 12
//   dout[k] = (h[k-1]+3h[k-1-W]+4h[k-1-2W]+3h[k-1-3W]+h[k-1-4W]) / 12
// so dout latched on enable k is centred on input pixel k-2W-3. Lines are a
// continuous raster: taps near a line end read the neighbouring line.
// Horizontal first is this design's choice; the document gives the two
// equal convolvers and the intermediate memory.
module gauss_filter2d
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W = 256
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  pixel_t din,
  output pixel_t dout
);

  pixel_t h;

  gauss_conv1d #(.STRIDE(1))     u_horiz (.clk, .rst_n, .en, .din(din), .dout(h));
  gauss_conv1d #(.STRIDE(IMG_W)) u_vert  (.clk, .rst_n, .en, .din(h),   .dout(dout));

endmodule
