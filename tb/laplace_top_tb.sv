// laplace_top_tb: the nonlinear Laplace pipeline end to end with 16-pixel
// lines, driven and checked by laplace_driver.
module laplace_top_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import edge_pkg::*;
  localparam int W = 16, H = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pix_en, edge_out, done;
  pixel_t pix, threshold, strength_out;
  int checks, failures;

  laplace_top #(.IMG_W(W)) dut (.clk, .rst_n, .pix_en, .pix, .threshold, .edge_out, .strength_out);

  laplace_driver #(.W(W), .H(H), .NF(3)) drv (
    .clk, .rst_n, .pix_en, .pix, .threshold, .edge_in(edge_out), .strength_in(strength_out),
    .done, .checks, .failures);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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
