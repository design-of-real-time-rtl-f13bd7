// canny_top: Canny edge detector as a pixel pipeline.
//
// Gaussian smoothing (gauss_filter2d) -> horizontal/vertical gradient and
// saturated magnitude (gradient) -> nonmaximum suppression
// (nonmax_suppress) -> double threshold by two-pass labeling
// (hyst_threshold). The first three stages stream one pixel per enable with
// line FIFOs; the threshold stores the frame's labels and emits the binary
// edge image after the frame, one pixel per clock.
//
// Interface: pix is presented with pix_en, and sof marks pixel (0,0) of a
// frame in raster order, IMG_W x IMG_H. Pixel enables must be at least two
// clocks apart because nonmaximum suppression makes two comparisons per
// pixel. nms_mag is the suppressed magnitude stream (its pixel for input
// position n is latched 3*IMG_W+7 enables after n). The threshold's frame
// starts 3*IMG_W+8 enables after sof, which is when the suppressed value of
// input pixel (0,0) reaches it, so the edge image is aligned with the input
// image. Image borders are not treated specially: the filters see a
// continuous raster in which a line's neighbour across the border is the
// previous or next line. Frames may follow each other with no gap: the
// threshold keeps two banks, labeling one frame while it resolves and emits
// the previous one. Only the last frame of a sequence needs 3*IMG_W+8 more
// enables (any pixel values) to push its pixels through to the threshold.
// The chain of stages follows the document; the alignment counter, the
// banks and the frame handshake are this design's own.
module canny_top
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W      = 256,
  parameter int unsigned IMG_H      = 256,
  parameter int unsigned MAX_LABELS = 1024,
  parameter int unsigned MAX_PAIRS  = 1024
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   pix_en,
  input  logic   sof,
  input  pixel_t pix,
  input  pixel_t th_low,
  input  pixel_t th_high,
  output pixel_t nms_mag,
  output logic   edge_valid,
  output logic   edge_out,
  output logic   edge_last,
  output logic   busy,
  output logic   frame_dropped,
  output logic   overflow
);

  localparam int unsigned NPX = IMG_W * IMG_H;
  localparam int unsigned LAT = 3 * IMG_W + 8;   // enables from sof to threshold frame start
  localparam int unsigned CW  = $clog2(NPX + 1);

  pixel_t g, mag;
  grad_t  sx, sy;
  logic [CW-1:0] cnt, idx;
  logic   thr_sof;

  gauss_filter2d #(.IMG_W(IMG_W)) u_gauss (.clk, .rst_n, .en(pix_en), .din(pix), .dout(g));

  gradient #(.IMG_W(IMG_W)) u_grad (.clk, .rst_n, .en(pix_en), .din(g), .sx(sx), .sy(sy), .mag(mag));

  nonmax_suppress #(.IMG_W(IMG_W)) u_nms (.clk, .rst_n, .en(pix_en), .sx(sx), .sy(sy), .mag(mag), .dout(nms_mag));

  // Position of the current pixel in the input frame.
  assign idx     = sof ? '0 : cnt;
  assign thr_sof = idx == CW'(LAT);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      cnt <= CW'(NPX);     // no frame seen yet
    else if (pix_en) cnt <= (idx == CW'(NPX)) ? idx : idx + 1'b1;

  hyst_threshold #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .MAX_LABELS(MAX_LABELS), .MAX_PAIRS(MAX_PAIRS)
  ) u_thr (
    .clk, .rst_n,
    .en(pix_en), .sof(thr_sof), .din(nms_mag),
    .th_low, .th_high,
    .out_valid(edge_valid), .out_edge(edge_out), .out_last(edge_last),
    .busy, .frame_dropped, .overflow
  );

endmodule
