// nl_laplace: nonlinear Laplace filter and edge strength detector on a 3x3
// neighbourhood.
//
//   gradmax = max(3x3) - I      gradmin = min(3x3) - I
//   NL      = gradmax + gradmin E       = min(gradmax, -gradmin)
// where I is the centre pixel. Two line FIFOs and two registers per row
// hold the window (the third pixel of each row is the row input itself).
// The maximum and minimum are each a tree of 8 compare-and-select cells in
// four levels (9 -> 5 -> 3 -> 2 -> 1 values); this tree is the slow part.
// TREE_REGS sets how many register ranks cut it:
//   0  no register inside the tree (smallest, slowest),
//   2  a rank after level 2 (the middle) and one after level 4 (the end),
//   4  a rank after every level (fastest).
// NL and E are registered at the output in every case. NL is 9-bit signed
// (-255..255) and E is 8-bit unsigned.
//
// Timing, with s[k] the input on enable k: the outputs latched on enable k
// belong to the window seen on enable k-TREE_REGS, whose centre is
// s[k-W-1-TREE_REGS] (s[k-W-3] at the default). The formulas, the window
// and the three register options (none, middle and end, two more) follow
// the document; the default of 2, and the reading of "two additional
// registers" as ranks after levels 1 and 3, are this design's choices.
module nl_laplace
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W     = 256,
  parameter int unsigned TREE_REGS = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  pixel_t din,
  output grad_t  nl,
  output pixel_t strength
);

  // values still in the tree at each level, plus the centre pixel
  typedef struct packed {
    pixel_t [9:0] mx;
    pixel_t [9:0] mn;
    pixel_t       c;
  } tree_t;

  localparam int unsigned NV [5] = '{9, 5, 3, 2, 1};

  pixel_t f1, f2;
  pixel_t r [3][2];            // [row][0: x, 1: x-1]; row 0 is the newest line
  tree_t  win;                 // the window as tree level 0
  tree_t  last;                // after level 4
  grad_t  gmax, gmin;

  line_delay #(.WIDTH(8), .DEPTH(IMG_W)) u_fifo1 (.clk, .rst_n, .en, .din(din), .dout(f1));
  line_delay #(.WIDTH(8), .DEPTH(IMG_W)) u_fifo2 (.clk, .rst_n, .en, .din(f1),  .dout(f2));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) begin
        r[i][0] <= '0;
        r[i][1] <= '0;
      end
    end else if (en) begin
      r[0][0] <= din; r[0][1] <= r[0][0];
      r[1][0] <= f1;  r[1][1] <= r[1][0];
      r[2][0] <= f2;  r[2][1] <= r[2][0];
    end

  function automatic pixel_t pmax(pixel_t a, pixel_t b);
    return (a > b) ? a : b;
  endfunction
  function automatic pixel_t pmin(pixel_t a, pixel_t b);
    return (a < b) ? a : b;
  endfunction

  // one tree level: neighbours pairwise, an odd last value passes on
  function automatic tree_t level(tree_t t, int unsigned n);
    tree_t o = '0;
    for (int unsigned i = 0; i < 5; i++)
      if (2*i + 1 < n) begin
        o.mx[i] = pmax(t.mx[2*i], t.mx[2*i+1]);
        o.mn[i] = pmin(t.mn[2*i], t.mn[2*i+1]);
      end else if (2*i < n) begin
        o.mx[i] = t.mx[2*i];
        o.mn[i] = t.mn[2*i];
      end
    o.c = t.c;
    return o;
  endfunction

  always_comb begin
    pixel_t w [9];
    w = '{din, r[0][0], r[0][1], f1, r[1][0], r[1][1], f2, r[2][0], r[2][1]};
    win = '0;
    for (int i = 0; i < 9; i++) begin
      win.mx[i] = w[i];
      win.mn[i] = w[i];
    end
    win.c = w[4];
  end

  for (genvar L = 1; L <= 4; L++) begin : g_level
    localparam bit REG = (TREE_REGS >= 4) || (TREE_REGS >= 2 && (L == 2 || L == 4));
    tree_t prev, nx, q;
    if (L == 1) begin : g_first
      assign prev = win;
    end else begin : g_next
      assign prev = g_level[L-1].q;
    end
    assign nx = level(prev, NV[L-1]);
    if (REG) begin : g_reg
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n)  q <= '0;
        else if (en) q <= nx;
    end else begin : g_wire
      assign q = nx;
    end
  end
  assign last = g_level[4].q;

  always_comb begin
    gmax = $signed({1'b0, last.mx[0]}) - $signed({1'b0, last.c});
    gmin = $signed({1'b0, last.mn[0]}) - $signed({1'b0, last.c});
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      nl       <= '0;
      strength <= '0;
    end else if (en) begin
      nl       <= gmax + gmin;
      strength <= (gmax < -gmin) ? pixel_t'(gmax) : pixel_t'(-gmin);
    end

  initial assert (TREE_REGS == 0 || TREE_REGS == 2 || TREE_REGS == 4)
    else $error("TREE_REGS must be 0, 2 or 4");

endmodule
