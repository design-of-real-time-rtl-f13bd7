// zero_cross_tb: random sign images (blobs of negative NL) and edge
// strengths through the zero crossing, multiplication and threshold unit
// (7-pixel lines). The contour is computed here as "negative pixel with at
// least one non-negative 4-neighbour"; product and edge bit are compared.
// Interior, contour and above/below-threshold pixels must all occur.
module zero_cross_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import edge_pkg::*;
  import edge_ref_pkg::*;
  localparam int W = 7;
  localparam int T = 100;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  grad_t  nl = '0;
  pixel_t e = '0, prod;
  logic   edg;
  int checks = 0, failures = 0, n_int = 0, n_cont = 0, n_above = 0, n_below = 0;
  int ins[$], ies[$], op[$], oe[$];

  zero_cross #(.IMG_W(W)) dut (.clk, .rst_n, .en, .nl, .strength(e), .threshold(8'(T)),
                               .edge_out(edg), .strength_out(prod));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stream_t s_nl, s_e, rp, re;
    valid_t  sv, rv;
    int neg_run = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      if (neg_run == 0 && $urandom_range(0, 5) == 0) neg_run = $urandom_range(1, 12);
      if (neg_run > 0 || $urandom_range(0, 9) == 0) nl = grad_t'(-$urandom_range(1, 255));
      else                                           nl = grad_t'($urandom_range(0, 255));
      if (en && neg_run > 0) neg_run--;
      e = 8'($urandom);
      @(posedge clk);
      #1;
      if (en) begin
        ins.push_back(nl); ies.push_back(e);
        op.push_back(prod); oe.push_back(edg);
      end
    end
    s_nl = new[ins.size()]; s_e = new[ins.size()]; sv = new[ins.size()];
    foreach (s_nl[k]) begin s_nl[k] = ins[k]; s_e[k] = ies[k]; sv[k] = 1'b1; end
    zc(s_nl, s_e, sv, W, T, rp, re, rv);
    foreach (s_nl[k])
      if (rv[k]) begin
        automatic int c = k - W - 1;
        checks += 2;
        if (op[k] != rp[k] || oe[k] != re[k]) begin
          failures++;
          $display("FAIL k=%0d got (%0d,%0d) exp (%0d,%0d)", k, op[k], oe[k], rp[k], re[k]);
        end
        if (s_nl[c] < 0) begin
          if (s_nl[c-1] < 0 && s_nl[c+1] < 0 && s_nl[c-W] < 0 && s_nl[c+W] < 0) n_int++;
          else n_cont++;
        end
        if (re[k] != 0) n_above++; else if (rp[k] != 0) n_below++;
      end
    checks++;
    if (n_int == 0 || n_cont == 0 || n_above == 0 || n_below == 0) begin
      failures++;
      $display("FAIL coverage int=%0d cont=%0d above=%0d below=%0d", n_int, n_cont, n_above, n_below);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
