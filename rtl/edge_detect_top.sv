// edge_detect_top: the two real-time edge detectors side by side.
//
// The Canny detector (canny_top) and the nonlinear Laplace detector
// (laplace_top) are independent pipelines; each has its own pixel input,
// thresholds and outputs (c_* and l_*), and they share only the clock and
// reset. Pixel enables of the Canny input must be at least two clocks
// apart; the Laplace input accepts one pixel per clock. See the two
// pipelines for their timing.
module edge_detect_top
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256
) (
  input  logic   clk,
  input  logic   rst_n,
  // Canny detector
  input  logic   c_pix_en,
  input  logic   c_sof,
  input  pixel_t c_pix,
  input  pixel_t c_th_low,
  input  pixel_t c_th_high,
  output pixel_t c_nms_mag,
  output logic   c_edge_valid,
  output logic   c_edge,
  output logic   c_edge_last,
  output logic   c_busy,
  output logic   c_frame_dropped,
  output logic   c_overflow,
  // nonlinear Laplace detector
  input  logic   l_pix_en,
  input  pixel_t l_pix,
  input  pixel_t l_threshold,
  output logic   l_edge,
  output pixel_t l_strength
);

  canny_top #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_canny (
    .clk, .rst_n,
    .pix_en(c_pix_en), .sof(c_sof), .pix(c_pix),
    .th_low(c_th_low), .th_high(c_th_high),
    .nms_mag(c_nms_mag),
    .edge_valid(c_edge_valid), .edge_out(c_edge), .edge_last(c_edge_last),
    .busy(c_busy), .frame_dropped(c_frame_dropped), .overflow(c_overflow)
  );

  laplace_top #(.IMG_W(IMG_W)) u_laplace (
    .clk, .rst_n,
    .pix_en(l_pix_en), .pix(l_pix), .threshold(l_threshold),
    .edge_out(l_edge), .strength_out(l_strength)
  );

endmodule
