// canny_top_tb: the Canny pipeline end to end at 24x16 pixels, driven and
// checked by canny_driver (see there for the frame schedule).
module canny_top_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import edge_pkg::*;
  localparam int W = 24, H = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pix_en, sof, edge_valid, edge_out, edge_last, busy, frame_dropped, overflow, done;
  pixel_t pix, th_low, th_high, nms_mag;
  int checks, failures;

  canny_top #(.IMG_W(W), .IMG_H(H), .MAX_LABELS(20), .MAX_PAIRS(20)) dut (
    .clk, .rst_n, .pix_en, .sof, .pix, .th_low, .th_high, .nms_mag,
    .edge_valid, .edge_out, .edge_last, .busy, .frame_dropped, .overflow);

  canny_driver #(.W(W), .H(H)) drv (
    .clk, .rst_n, .pix_en, .sof, .pix, .th_low, .th_high, .nms_mag,
    .edge_valid, .edge_in(edge_out), .edge_last, .busy, .frame_dropped, .overflow,
    .pairs_seen(dut.u_thr.b_npairs != 0), .done, .checks, .failures);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
