// nl_laplace_tb: random and piecewise-flat images through the nonlinear
// Laplace filter (7-pixel lines), enables on most clocks. Three instances
// run side by side, with 0, 2 and 4 register ranks in the max/min tree; the
// NL and E of each are compared with max/min of the 3x3 window computed
// here, at that instance's latency. Positive, negative and zero NL must all
// occur.
module nl_laplace_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import edge_pkg::*;
  import edge_ref_pkg::*;
  localparam int W = 7;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  localparam int NR = 3;
  localparam int REGS [NR] = '{0, 2, 4};
  pixel_t din = '0, e [NR];
  grad_t  nl [NR];
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0, n_zero = 0;
  int xs[$], onl[NR][$], oe[NR][$];

  for (genvar i = 0; i < NR; i++) begin : g_dut
    nl_laplace #(.IMG_W(W), .TREE_REGS(REGS[i])) dut (.clk, .rst_n, .en, .din, .nl(nl[i]),
                                                      .strength(e[i]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stream_t s, rnl, re;
    valid_t  sv, rv;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 4) != 0);
      din = ((i / 300) % 2 == 0) ? 8'($urandom) : ((i % W) < 3 ? 8'd20 : 8'd200);
      @(posedge clk);
      #1;
      if (en) begin
        xs.push_back(din);
        for (int i = 0; i < NR; i++) begin
          onl[i].push_back(nl[i]);
          oe[i].push_back(e[i]);
        end
      end
    end
    s  = new[xs.size()];
    sv = new[xs.size()];
    foreach (s[k]) begin s[k] = xs[k]; sv[k] = 1'b1; end
    for (int i = 0; i < NR; i++) begin
      nlap(s, sv, W, rnl, re, rv, REGS[i]);
      foreach (s[k])
        if (rv[k]) begin
          checks += 2;
          if (onl[i][k] != rnl[k] || oe[i][k] != re[k]) begin
            failures++;
            $display("FAIL regs=%0d k=%0d got (%0d,%0d) exp (%0d,%0d)", REGS[i], k,
                     onl[i][k], oe[i][k], rnl[k], re[k]);
          end
          if (rnl[k] > 0) n_pos++; else if (rnl[k] < 0) n_neg++; else n_zero++;
        end
    end
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
