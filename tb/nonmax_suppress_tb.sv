// nonmax_suppress_tb: random gradients and magnitudes (a narrow range, so
// ties between centre and neighbours are frequent) through nonmaximum
// suppression with 6-pixel lines. Pixel enables are 2 to 4 clocks apart,
// the fastest being the two-comparison limit. Every output is compared
// with the local-maximum rule; kept and suppressed pixels, all four
// directions and ties must each occur.
module nonmax_suppress_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import edge_pkg::*;
  import edge_ref_pkg::*;
  localparam int W = 6;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  grad_t  sx = '0, sy = '0;
  pixel_t mag = '0, y;
  int checks = 0, failures = 0;
  int ixs[$], iys[$], ims[$], os[$];
  int n_keep = 0, n_supp = 0;
  int n_dir[4] = '{0, 0, 0, 0};

  nonmax_suppress #(.IMG_W(W)) dut (.clk, .rst_n, .en, .sx, .sy, .mag, .dout(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stream_t s_x, s_y, s_m, r;
    valid_t  sv, rv;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      en  = 1'b1;
      sx  = grad_t'($urandom_range(0, 510) - 255);
      sy  = grad_t'($urandom_range(0, 510) - 255);
      if ($urandom_range(0, 5) == 0) sy = '0;
      mag = 8'($urandom_range(0, 6) * ((i % 400 < 200) ? 1 : 40));
      @(posedge clk);
      #1;
      ixs.push_back(sx); iys.push_back(sy); ims.push_back(mag);
      os.push_back(y);
      @(negedge clk);
      en = 1'b0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    s_x = new[ixs.size()]; s_y = new[ixs.size()]; s_m = new[ixs.size()]; sv = new[ixs.size()];
    foreach (s_x[k]) begin s_x[k] = ixs[k]; s_y[k] = iys[k]; s_m[k] = ims[k]; sv[k] = 1'b1; end
    nms(s_x, s_y, s_m, sv, W, r, rv);
    foreach (s_x[k])
      if (rv[k]) begin
        checks++;
        if (os[k] != r[k]) begin
          failures++;
          $display("FAIL k=%0d got %0d exp %0d", k, os[k], r[k]);
        end
        if (r[k] != 0)                n_keep++;
        else if (s_m[k-W-2] != 0)     n_supp++;
        n_dir[dir_of(s_x[k-W-2], s_y[k-W-2])]++;
      end
    checks++;
    if (n_keep == 0 || n_supp == 0 || n_dir[0] == 0 || n_dir[1] == 0 || n_dir[2] == 0 || n_dir[3] == 0) begin
      failures++;
      $display("FAIL coverage keep=%0d supp=%0d dirs=%p", n_keep, n_supp, n_dir);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
