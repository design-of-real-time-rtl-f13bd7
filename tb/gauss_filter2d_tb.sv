// gauss_filter2d_tb: streams a random image with flat and extreme patches
// through the 2D Gaussian (8-pixel lines) and compares each output with the
// separable (1,3,4,3,1)/12 model, including the one-enable stage delay.
module gauss_filter2d_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import edge_pkg::*;
  import edge_ref_pkg::*;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  pixel_t din = '0, y;
  int checks = 0, failures = 0;
  int xs[$], os[$];

  gauss_filter2d #(.IMG_W(W)) dut (.clk, .rst_n, .en, .din, .dout(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stream_t s, r;
    valid_t  sv, rv;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 4) != 0);
      din = (i / 200) % 3 == 0 ? 8'(255 * ((i / 3) % 2)) : 8'($urandom);
      @(posedge clk);
      #1;
      if (en) begin
        xs.push_back(din);
        os.push_back(y);
      end
    end
    s  = new[xs.size()];
    sv = new[xs.size()];
    foreach (s[k]) begin s[k] = xs[k]; sv[k] = 1'b1; end
    gauss2d(s, sv, W, r, rv);
    foreach (s[k])
      if (rv[k]) begin
        checks++;
        if (os[k] != r[k]) begin failures++; $display("FAIL k=%0d got %0d exp %0d", k, os[k], r[k]); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
