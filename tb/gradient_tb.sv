// gradient_tb: random pixels with small and large steps through the
// gradient unit (6-pixel lines); checks Sx, Sy and the saturated magnitude,
// and that both saturated and unsaturated magnitudes occurred.
module gradient_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import edge_pkg::*;
  import edge_ref_pkg::*;
  localparam int W = 6;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  pixel_t din = '0, mag;
  grad_t  sx, sy;
  int checks = 0, failures = 0, n_sat = 0, n_small = 0;
  int xs[$], ox[$], oy[$], om[$];

  gradient #(.IMG_W(W)) dut (.clk, .rst_n, .en, .din, .sx, .sy, .mag);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stream_t s, rx, ry, rm;
    valid_t  sv, rv;
    int base = 128;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      if ($urandom_range(0, 4) == 0) base = $urandom_range(0, 255);
      din = (i % 500 < 250) ? 8'($urandom) : 8'((base + $urandom_range(0, 16)) % 256);
      @(posedge clk);
      #1;
      if (en) begin
        xs.push_back(din);
        ox.push_back(sx); oy.push_back(sy); om.push_back(mag);
      end
    end
    s  = new[xs.size()];
    sv = new[xs.size()];
    foreach (s[k]) begin s[k] = xs[k]; sv[k] = 1'b1; end
    grad(s, sv, W, rx, ry, rm, rv);
    foreach (s[k])
      if (rv[k]) begin
        checks += 3;
        if (ox[k] != rx[k] || oy[k] != ry[k] || om[k] != rm[k]) begin
          failures++;
          $display("FAIL k=%0d got (%0d,%0d,%0d) exp (%0d,%0d,%0d)", k, ox[k], oy[k], om[k], rx[k], ry[k], rm[k]);
        end
        if (rm[k] == 255) n_sat++;
        else              n_small++;
      end
    checks++;
    if (n_sat == 0 || n_small == 0) begin failures++; $display("FAIL coverage sat=%0d small=%0d", n_sat, n_small); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
