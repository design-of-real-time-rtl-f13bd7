// edge_detect_top_tb: the whole design at its default size (256-pixel
// lines, 256x256 frames, 1024 labels). The Canny half is driven and checked
// by canny_driver (warm-up frame, checked frames, a dropped frame, a label
// overflow frame) and the Laplace half by laplace_driver (three frames), both
// at the same time.
module edge_detect_top_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import edge_pkg::*;
  localparam int W = 256, H = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  logic c_pix_en, c_sof, c_edge_valid, c_edge, c_edge_last, c_busy, c_frame_dropped, c_overflow, c_done;
  pixel_t c_pix, c_th_low, c_th_high, c_nms_mag;
  logic l_pix_en, l_edge, l_done;
  pixel_t l_pix, l_threshold, l_strength;
  int c_checks, c_failures, l_checks, l_failures;

  edge_detect_top dut (
    .clk, .rst_n,
    .c_pix_en, .c_sof, .c_pix, .c_th_low, .c_th_high, .c_nms_mag,
    .c_edge_valid, .c_edge, .c_edge_last, .c_busy, .c_frame_dropped, .c_overflow,
    .l_pix_en, .l_pix, .l_threshold, .l_edge, .l_strength);

  canny_driver #(.W(W), .H(H)) c_drv (
    .clk, .rst_n, .pix_en(c_pix_en), .sof(c_sof), .pix(c_pix), .th_low(c_th_low), .th_high(c_th_high),
    .nms_mag(c_nms_mag), .edge_valid(c_edge_valid), .edge_in(c_edge), .edge_last(c_edge_last),
    .busy(c_busy), .frame_dropped(c_frame_dropped), .overflow(c_overflow),
    .pairs_seen(dut.u_canny.u_thr.b_npairs != 0), .done(c_done), .checks(c_checks), .failures(c_failures));

  laplace_driver #(.W(W), .H(H), .NF(3)) l_drv (
    .clk, .rst_n, .pix_en(l_pix_en), .pix(l_pix), .threshold(l_threshold),
    .edge_in(l_edge), .strength_in(l_strength),
    .done(l_done), .checks(l_checks), .failures(l_failures));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (6000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c_checks + l_checks, c_failures + l_failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (c_done && l_done);
    $display("TB_RESULT checks=%0d failures=%0d", c_checks + l_checks, c_failures + l_failures);
    $finish;
  end
endmodule
