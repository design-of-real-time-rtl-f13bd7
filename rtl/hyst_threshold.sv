// hyst_threshold: double (hysteresis) threshold of the suppressed gradient
// magnitude, done with a two-pass labeling instead of a recursive search.
//
// A pixel is an edge if its magnitude is above the low threshold and it is
// 8-connected, through such pixels, to a pixel above the high threshold.
//   Pass 1 (streamed, one pixel per enable): every pixel above th_low gets a
//     label. With the causal mask left / up-left / up / up-right it takes
//     the label of "up" if that is set, else of "left" or "up-left", else of
//     "up-right", else a new label. If "up" is empty and both a left-side
//     label and "up-right" are set and differ, the pair is an equivalence and
//     is stored in the equivalence table (with 8-connectivity no other pair
//     can be new). A label is marked strong when any of its pixels is above
//     th_high. The label of every pixel goes to the frame store.
//   Resolve: the stored pairs are merged in a union-find table (each label
//     points to a smaller one; a root points to itself), then one ascending
//     sweep points every label straight at its root and ORs its strong flag
//     into the root's.
//   Pass 2: the frame store is read back at one pixel per clock, and a
//     pixel is an edge when its label is non-zero and its root is strong.
// Frame store and tables exist twice (banks). Pass 1 of a frame fills one
// bank while resolve and pass 2 of the previous frame work on the other, so
// frames can follow each other without gaps. When pass 1 ends while the
// back end is still busy with the other bank, the new frame is discarded
// and frame_dropped pulses. If labels (MAX_LABELS-1 usable) or pair entries
// run out, the frame's overflow flag is set; it is shown on overflow while
// that frame's pass 2 runs, and affected pixels may be misclassified.
// Interface: pixels come with en, and sof marks pixel (0,0) of a frame in
// raster order, IMG_W x IMG_H; a sof during pass 1 is ignored. The result
// comes out with out_valid, one pixel per clock, out_last on the final one.
// The two passes and the equivalence table follow the document; the mask,
// the union-find resolve, the banks, the table sizes and the frame handshake
// are this design's own.
module hyst_threshold
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W      = 256,
  parameter int unsigned IMG_H      = 256,
  parameter int unsigned MAX_LABELS = 1024,
  parameter int unsigned MAX_PAIRS  = 1024
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   sof,
  input  pixel_t din,
  input  pixel_t th_low,
  input  pixel_t th_high,
  output logic   out_valid,
  output logic   out_edge,
  output logic   out_last,
  output logic   busy,
  output logic   frame_dropped,
  output logic   overflow
);

  localparam int unsigned LW  = $clog2(MAX_LABELS);
  localparam int unsigned PW  = $clog2(MAX_PAIRS + 1);
  localparam int unsigned QW  = (MAX_PAIRS > 1) ? $clog2(MAX_PAIRS) : 1;
  localparam int unsigned XW  = (IMG_W > 1) ? $clog2(IMG_W) : 1;
  localparam int unsigned YW  = (IMG_H > 1) ? $clog2(IMG_H) : 1;
  localparam int unsigned NPX = IMG_W * IMG_H;
  localparam int unsigned AW  = $clog2(NPX);

  typedef logic [LW-1:0] label_t;
  typedef struct packed { label_t a; label_t b; } pair_t;
  typedef enum logic [1:0] {B_IDLE, B_UNION, B_FLAT, B_PASS2} bstate_t;

  // ---------------- storage, two banks ----------------
  // Each bank array is one memory addressed by {bank, index}, so a bank
  // spans the next power of two of its size.
  label_t  line_buf [IMG_W];            // labels of the previous line
  label_t  frame_mem [2 << AW];         // label of every pixel of a frame
  label_t  parent [2 << LW];            // equivalence table (union-find)
  logic    strong_f [2 << LW];
  pair_t   pairs [2 << QW];

  // ---------------- pass 1 state ----------------
  logic          p1_run, wbank;
  logic [XW-1:0] x;
  logic [YW-1:0] y;
  label_t        left_l, ul_save;
  logic [LW:0]   next_label;            // one bit wider: MAX_LABELS means "exhausted"
  logic [PW-1:0] npairs;
  logic          p1_ovf;

  // ---------------- back end state ----------------
  bstate_t       bstate;
  logic          rbank, b_ovf;
  logic [LW:0]   b_nlabels, fl;
  logic [PW-1:0] b_npairs, pidx;
  logic          loaded;
  label_t        ra, rb;
  logic [AW-1:0] raddr;
  logic          rd_valid, rd_last;
  label_t        rd_label;

  // ---------------- pass 1: label one pixel ----------------
  logic    take, cand, is_strong, new_lbl, add_pair, last_px, handover;
  label_t  n_l, n_ul, n_u, n_ur, side, lbl;

  assign take     = en && (p1_run || sof);
  assign last_px  = (x == XW'(IMG_W - 1)) && (y == YW'(IMG_H - 1));
  assign handover = take && last_px && bstate == B_IDLE;

  always_comb begin
    cand      = din > th_low;
    is_strong = din > th_high;
    n_l  = (x != '0) ? left_l : '0;
    n_ul = (x != '0 && y != '0) ? ul_save : '0;
    n_u  = (y != '0) ? line_buf[x] : '0;
    n_ur = (y != '0 && x != XW'(IMG_W - 1)) ? line_buf[x + 1'b1] : '0;
    side = (n_l != '0) ? n_l : n_ul;
    new_lbl  = 1'b0;
    add_pair = 1'b0;
    lbl      = '0;
    if (cand) begin
      if (n_u != '0)          lbl = n_u;
      else if (side != '0) begin
        lbl      = side;
        add_pair = (n_ur != '0) && (n_ur != side);
      end
      else if (n_ur != '0)    lbl = n_ur;
      else if (next_label != (LW+1)'(MAX_LABELS)) begin
        lbl     = label_t'(next_label);
        new_lbl = 1'b1;
      end
    end
  end

  // ---------------- back end reads ----------------
  label_t pa, pb, fl_l, fl_root;
  always_comb begin
    pa      = parent[{rbank, ra}];
    pb      = parent[{rbank, rb}];
    fl_l    = label_t'(fl);
    fl_root = parent[{rbank, parent[{rbank, fl_l}]}];
  end

  // ---------------- table and frame store writes ----------------
  always_ff @(posedge clk) begin
    if (take) begin
      line_buf[x] <= lbl;
      frame_mem[{wbank, AW'(y) * AW'(IMG_W) + AW'(x)}] <= lbl;
      if (new_lbl) begin
        parent[{wbank, lbl}]   <= lbl;
        strong_f[{wbank, lbl}] <= is_strong;
      end else if (lbl != '0 && is_strong)
        strong_f[{wbank, lbl}] <= 1'b1;
      if (add_pair && npairs != PW'(MAX_PAIRS))
        pairs[{wbank, QW'(npairs)}] <= '{a: side, b: n_ur};
    end
    // union: both roots found and different, hang the larger on the smaller
    if (bstate == B_UNION && loaded && pa == ra && pb == rb && ra != rb) begin
      if (ra < rb) parent[{rbank, rb}] <= ra;
      else         parent[{rbank, ra}] <= rb;
    end
    // flatten: labels ascending, so parent[fl] already points at a root
    if (bstate == B_FLAT && fl != b_nlabels) begin
      parent[{rbank, fl_l}] <= fl_root;
      if (strong_f[{rbank, fl_l}]) strong_f[{rbank, fl_root}] <= 1'b1;
    end
    if (bstate == B_PASS2) rd_label <= frame_mem[{rbank, raddr}];
  end

  // ---------------- pass 1 control ----------------
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      p1_run        <= 1'b0;
      wbank         <= 1'b0;
      x             <= '0;
      y             <= '0;
      left_l        <= '0;
      ul_save       <= '0;
      next_label    <= (LW+1)'(1);
      npairs        <= '0;
      p1_ovf        <= 1'b0;
      frame_dropped <= 1'b0;
    end else begin
      frame_dropped <= take && last_px && bstate != B_IDLE;
      if (take) begin
        left_l  <= lbl;
        ul_save <= (y != '0) ? line_buf[x] : '0;
        if (new_lbl) next_label <= next_label + 1'b1;
        if (add_pair && npairs != PW'(MAX_PAIRS)) npairs <= npairs + 1'b1;
        if ((cand && lbl == '0) || (add_pair && npairs == PW'(MAX_PAIRS)))
          p1_ovf <= 1'b1;
        if (x == XW'(IMG_W - 1)) begin
          x <= '0;
          y <= last_px ? '0 : y + 1'b1;
        end else
          x <= x + 1'b1;
        p1_run <= !last_px;
        if (last_px) begin
          // the frame's tables go to the back end (or the frame is dropped);
          // pass 1 starts afresh either way
          if (handover) wbank <= !wbank;
          next_label <= (LW+1)'(1);
          npairs     <= '0;
          p1_ovf     <= 1'b0;
        end
      end
    end

  // ---------------- back end control: resolve and pass 2 ----------------
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      bstate    <= B_IDLE;
      rbank     <= 1'b0;
      b_ovf     <= 1'b0;
      b_nlabels <= '0;
      b_npairs  <= '0;
      fl        <= '0;
      pidx      <= '0;
      loaded    <= 1'b0;
      ra        <= '0;
      rb        <= '0;
      raddr     <= '0;
      rd_valid  <= 1'b0;
      rd_last   <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      rd_last  <= 1'b0;
      unique case (bstate)
        B_IDLE:
          if (handover) begin
            bstate    <= B_UNION;
            rbank     <= wbank;
            b_nlabels <= new_lbl ? next_label + 1'b1 : next_label;
            b_npairs  <= (add_pair && npairs != PW'(MAX_PAIRS)) ? npairs + 1'b1 : npairs;
            b_ovf     <= p1_ovf || (cand && lbl == '0) || (add_pair && npairs == PW'(MAX_PAIRS));
            pidx      <= '0;
            loaded    <= 1'b0;
          end
        B_UNION:
          if (!loaded) begin
            if (pidx == b_npairs) begin
              bstate <= B_FLAT;
              fl     <= (LW+1)'(1);
            end else begin
              ra     <= pairs[{rbank, QW'(pidx)}].a;
              rb     <= pairs[{rbank, QW'(pidx)}].b;
              loaded <= 1'b1;
            end
          end else if (pa != ra || pb != rb) begin
            ra <= pa;
            rb <= pb;
          end else begin
            pidx   <= pidx + 1'b1;
            loaded <= 1'b0;
          end
        B_FLAT:
          if (fl == b_nlabels) begin
            bstate <= B_PASS2;
            raddr  <= '0;
          end else
            fl <= fl + 1'b1;
        B_PASS2: begin
          rd_valid <= 1'b1;
          rd_last  <= (raddr == AW'(NPX - 1));
          if (raddr == AW'(NPX - 1)) bstate <= B_IDLE;
          else                       raddr  <= raddr + 1'b1;
        end
        default: bstate <= B_IDLE;
      endcase
    end

  always_comb begin
    busy      = p1_run || bstate != B_IDLE;
    overflow  = b_ovf;
    out_valid = rd_valid;
    out_last  = rd_last;
    out_edge  = rd_valid && rd_label != '0 && strong_f[{rbank, parent[{rbank, rd_label}]}];
  end

endmodule
