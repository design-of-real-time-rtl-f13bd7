// zero_cross: zero crossing detector, multiplication by the edge strength
// and threshold of the nonlinear Laplace edge detector.
//
// The sign bit of NL splits the image into negative (1) and non-negative (0)
// regions. The binary image is eroded with the 4-connected cross (centre and
// its left, right, upper and lower neighbours must all be 1) and XORed with
// itself, which leaves the 8-connected contour of the negative regions. The
// contour bit multiplies the edge strength E, which is delayed through a line
// FIFO and a register exactly like the centre of the binary window so both
// refer to the same pixel, and the product is compared with a threshold.
//
// Timing, with k the pixel enable: the outputs latched on enable k belong to
// the pixel that entered on enable k-W-1. strength_out is the product E*zc
// and edge_out is strength_out > threshold. The cross-shaped window and the
// E delay line follow the document; the threshold as a run-time input and
// the "greater than" test are this design's choices.
module zero_cross
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W = 256
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  grad_t  nl,
  input  pixel_t strength,
  input  pixel_t threshold,
  output logic   edge_out,
  output pixel_t strength_out
);

  logic   b, f1, f2, top, mid0, mid1, bot;
  pixel_t e_f, e_q, prod;
  logic   eroded, contour;

  assign b = nl[GRAD_W-1];

  line_delay #(.WIDTH(1), .DEPTH(IMG_W)) u_fifo1 (.clk, .rst_n, .en, .din(b),        .dout(f1));
  line_delay #(.WIDTH(1), .DEPTH(IMG_W)) u_fifo2 (.clk, .rst_n, .en, .din(f1),       .dout(f2));
  line_delay #(.WIDTH(8), .DEPTH(IMG_W)) u_efifo (.clk, .rst_n, .en, .din(strength), .dout(e_f));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      top <= 1'b0; mid0 <= 1'b0; mid1 <= 1'b0; bot <= 1'b0;
      e_q <= '0;
      edge_out <= 1'b0;
      strength_out <= '0;
    end else if (en) begin
      top  <= b;          // (x, y+1)
      mid0 <= f1;         // centre (x, y)
      mid1 <= mid0;       // (x-1, y)
      bot  <= f2;         // (x, y-1)
      e_q  <= e_f;        // edge strength of the centre pixel
      edge_out     <= prod > threshold;
      strength_out <= prod;
    end

  always_comb begin
    eroded  = mid0 & f1 & mid1 & top & bot;   // f1 is (x+1, y)
    contour = mid0 ^ eroded;
    prod    = contour ? e_q : '0;
  end

endmodule
