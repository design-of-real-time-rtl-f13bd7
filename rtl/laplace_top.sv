// laplace_top: nonlinear Laplace edge detector as a pixel pipeline.
//
// Gaussian smoothing (gauss_filter2d) -> nonlinear Laplace filter and edge
// strength (nl_laplace) -> zero crossing of the NL sign image, multiplied by
// the edge strength and thresholded (zero_cross). Every stage takes one
// pixel per enable; enables may come on every clock.
//
// Interface: pix with pix_en in raster order, IMG_W pixels per line;
// edge_out and strength_out are the results, also one per enable. The result
// for input pixel n is latched on enable n + 4*IMG_W + 9 (Gaussian centre
// 2W+3, NL filter W+3, zero crossing W+1, two stage-to-stage registers).
// Image borders are not treated specially (continuous raster). The chain of
// stages follows the document.
module laplace_top
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W = 256
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   pix_en,
  input  pixel_t pix,
  input  pixel_t threshold,
  output logic   edge_out,
  output pixel_t strength_out
);

  pixel_t g, e;
  grad_t  nl;

  gauss_filter2d #(.IMG_W(IMG_W)) u_gauss (.clk, .rst_n, .en(pix_en), .din(pix), .dout(g));

  nl_laplace #(.IMG_W(IMG_W)) u_nl (.clk, .rst_n, .en(pix_en), .din(g), .nl(nl), .strength(e));

  zero_cross #(.IMG_W(IMG_W)) u_zc (
    .clk, .rst_n, .en(pix_en), .nl(nl), .strength(e), .threshold,
    .edge_out, .strength_out
  );

endmodule
