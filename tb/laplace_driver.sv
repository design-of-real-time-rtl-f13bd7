// laplace_driver: stimulus and checker for a nonlinear Laplace pipeline,
// shared by the Laplace and the whole-design testbenches.
//
// It streams NF synthetic frames (shapes with increasing noise) with pixel
// enables on one or two clocks, records the product and edge bit after
// every enable and compares them with the reference chain (Gaussian,
// nonlinear Laplace, zero crossing, threshold). It counts contour pixels
// kept by the threshold, contour pixels rejected by it and negative pixels
// removed by the erosion, and fails if any of them never occurred.
module laplace_driver
  import edge_pkg::*;
  import edge_ref_pkg::*;
#(
  parameter int W  = 16,
  parameter int H  = 12,
  parameter int NF = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   pix_en,
  output pixel_t pix,
  output pixel_t threshold,
  input  logic   edge_in,
  input  pixel_t strength_in,
  output logic   done,
  output int     checks,
  output int     failures
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int T = 12;
  int xs[$], op[$], oe[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL laplace: %s", what);
    end
  endtask

  initial begin
    stream_t img, x, rp, re;
    valid_t  rv;
    int n_kept = 0, n_rej = 0, n_zc = 0;
    checks = 0; failures = 0; done = 1'b0;
    pix_en = 1'b0; pix = '0; threshold = pixel_t'(T);
    wait (rst_n);
    repeat (2) @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      test_image(W, H, 0, 3 * f, img);
      for (int i = 0; i < W * H; i++) begin
        @(negedge clk);
        pix_en = 1'b1; pix = pixel_t'(img[i]);
        @(posedge clk);
        #1;
        xs.push_back(img[i]);
        op.push_back(int'(strength_in));
        oe.push_back(int'(edge_in));
        @(negedge clk);
        pix_en = 1'b0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
    end
    x = new[xs.size()];
    foreach (x[k]) x[k] = xs[k];
    laplace_chain(x, W, T, rp, re, rv);
    foreach (x[k])
      if (rv[k]) begin
        check(op[k] == rp[k] && oe[k] == re[k],
              $sformatf("k=%0d got (%0d,%0d) exp (%0d,%0d)", k, op[k], oe[k], rp[k], re[k]));
        if (re[k] != 0)      n_kept++;
        else if (rp[k] != 0) n_rej++;
      end
    // negative pixels inside a negative region (removed by the erosion)
    begin
      stream_t g, gs, nl, e; valid_t xv, gv, gsv, nv;
      xv = new[x.size()];
      foreach (xv[k]) xv[k] = 1'b1;
      gauss2d(x, xv, W, g, gv);
      shift1(g, gv, gs, gsv);
      nlap(gs, gsv, W, nl, e, nv);
      for (int k = W + 1; k < nl.size() - W - 1; k++)
        if (nv[k-W] && nl[k] < 0 && nl[k-1] < 0 && nl[k+1] < 0 && nl[k-W] < 0 && nl[k+W] < 0) n_zc++;
    end
    $display("laplace mechanisms: edges above threshold=%0d contour below threshold=%0d eroded interior=%0d",
             n_kept, n_rej, n_zc);
    check(n_kept > 0, "no edge above threshold");
    check(n_rej > 0, "no contour pixel below threshold");
    check(n_zc > 0, "no eroded interior pixel");
    done = 1'b1;
  end
endmodule
