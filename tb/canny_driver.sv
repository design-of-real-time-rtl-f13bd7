// canny_driver: stimulus and checker for a Canny pipeline, shared by the
// Canny and the whole-design testbenches.
//
// It feeds six frames back to back (no blanking between them) with pixel
// enables 2 or 3 clocks apart:
//   0 warm-up frame (its upper lines depend on data before the first pixel),
//   1, 2, 3 and 5: synthetic shapes with increasing noise, all checked,
//   4 a grid of bright dots with a zero low threshold, which must overflow
//     the label table.
// Blanking pixels (enables without a frame start) follow the last frame to
// push its end through the line-buffered stages. The suppressed magnitude
// stream is compared on every enable with the reference chain, and each
// frame's edge image with a flood-fill hysteresis of the reference
// magnitudes. It counts the mechanisms seen (saturated magnitude, each
// gradient direction, suppression, weak pixels kept and dropped, label
// merges, pass 2 of one frame overlapping the input of the next, overflow)
// and fails a mechanism that never occurred, or any dropped frame.
module canny_driver
  import edge_pkg::*;
  import edge_ref_pkg::*;
#(
  parameter int W = 16,
  parameter int H = 12
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   pix_en,
  output logic   sof,
  output pixel_t pix,
  output pixel_t th_low,
  output pixel_t th_high,
  input  pixel_t nms_mag,
  input  logic   edge_valid,
  input  logic   edge_in,
  input  logic   edge_last,
  input  logic   busy,
  input  logic   frame_dropped,
  input  logic   overflow,
  input  logic   pairs_seen,      // the threshold unit holds at least one label pair
  output logic   done,
  output int     checks,
  output int     failures
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NPX = W * H;
  localparam int LAT = 3 * W + 8;
  localparam int NF  = 6;
  localparam int LO  = 8, HI = 250;

  int xs[$], ys[$];
  int sofs[NF];
  int results[$][$];
  int cur[$];
  int ovf_at_end[$];
  int n_drop = 0, n_pairs = 0, n_overlap = 0;
  bit sending = 1'b0;
  int frame_lo[NF], frame_hi[NF];

  always @(posedge clk) if (rst_n) begin
    if (edge_valid) cur.push_back(int'(edge_in));
    if (edge_valid && sending) n_overlap++;
    if (edge_valid && pairs_seen && cur.size() == 1) n_pairs++;
    if (edge_last) begin
      results.push_back(cur);
      cur.delete();
    end
    if (frame_dropped) n_drop++;
  end
  // overflow holds for the frame whose pass 2 just ended
  always @(posedge clk) if (rst_n && edge_last) ovf_at_end.push_back(int'(overflow));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL canny: %s", what);
    end
  endtask

  task automatic one_pixel(int v, bit s);
    @(negedge clk);
    pix_en = 1'b1; sof = s; pix = pixel_t'(v);
    @(posedge clk);
    #1;
    xs.push_back(v);
    ys.push_back(int'(nms_mag));
    @(negedge clk);
    pix_en = 1'b0; sof = 1'b0;
    if ($urandom_range(0, 1) == 1) @(negedge clk);
  endtask

  task automatic send_frame(int f, stream_t img);
    sofs[f] = xs.size();
    for (int i = 0; i < NPX; i++) begin
      // thresholds change when the frame reaches the threshold unit
      if (i == LAT) begin th_low = pixel_t'(frame_lo[f]); th_high = pixel_t'(frame_hi[f]); end
      one_pixel(img[i], i == 0);
    end
  endtask

  task automatic blank_until_idle();
    int n = 0;
    while (n < LAT + 2 || busy) begin
      one_pixel(30, 1'b0);
      n++;
    end
  endtask

  initial begin
    stream_t img, ref_y, frame, ref_e;
    valid_t  ref_v;
    int accepted[$];
    int n_sat = 0, n_supp = 0, n_keep = 0, n_wk = 0, n_wd = 0, ok;
    int n_dir[4] = '{0, 0, 0, 0};
    checks = 0; failures = 0; done = 1'b0;
    pix_en = 1'b0; sof = 1'b0; pix = '0; th_low = pixel_t'(LO); th_high = pixel_t'(HI);
    foreach (frame_lo[f]) begin frame_lo[f] = LO; frame_hi[f] = HI; end
    frame_lo[4] = 0; frame_hi[4] = 250;
    wait (rst_n);
    repeat (2) @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      test_image(W, H, (f == 4) ? 1 : 0, (f == 4) ? 0 : 2 * f, img);
      sending = 1'b1;
      send_frame(f, img);
    end
    sending = 1'b0;
    blank_until_idle();
    repeat (10) @(posedge clk);
    accepted = '{0, 1, 2, 3, 4, 5};

    // suppressed magnitude stream, every enable
    begin
      stream_t x;
      x = new[xs.size()];
      foreach (x[k]) x[k] = xs[k];
      canny_chain(x, W, ref_y, ref_v);
    end
    foreach (ys[k])
      if (ref_v[k]) check(ys[k] == ref_y[k], $sformatf("nms k=%0d got %0d exp %0d", k, ys[k], ref_y[k]));

    check(results.size() == accepted.size(),
          $sformatf("%0d frames out, expected %0d", results.size(), accepted.size()));
    for (int a = 0; a < accepted.size() && a < results.size(); a++) begin
      automatic int f = accepted[a];
      automatic bit all_valid = 1'b1;
      frame = new[NPX];
      for (int i = 0; i < NPX; i++) begin
        frame[i] = ref_y[sofs[f] + LAT + i - 1];
        if (!ref_v[sofs[f] + LAT + i - 1]) all_valid = 1'b0;
      end
      if (f == 4) begin
        check(ovf_at_end[a] == 1, "noise frame did not overflow the label table");
        continue;
      end
      check(ovf_at_end[a] == 0, $sformatf("frame %0d overflowed", f));
      if (!all_valid) continue;
      hyst(frame, W, H, frame_lo[f], frame_hi[f], ref_e);
      ok = 1;
      for (int i = 0; i < NPX; i++) begin
        check(results[a][i] == ref_e[i],
              $sformatf("frame %0d pixel %0d got %0d exp %0d", f, i, results[a][i], ref_e[i]));
        if (frame[i] > frame_lo[f] && frame[i] <= frame_hi[f]) begin
          if (ref_e[i] != 0) n_wk++; else n_wd++;
        end
        if (ref_e[i] != 0) n_keep++;
      end
    end

    // mechanisms, counted on the stimulus that was checked above
    begin
      stream_t x, g, gs, sx, sy, m; valid_t xv, gv, gsv, v;
      x = new[xs.size()]; xv = new[xs.size()];
      foreach (x[k]) begin x[k] = xs[k]; xv[k] = 1'b1; end
      gauss2d(x, xv, W, g, gv);
      shift1(g, gv, gs, gsv);
      grad(gs, gsv, W, sx, sy, m, v);
      foreach (m[k]) if (v[k]) begin
        if (m[k] == 255) n_sat++;
        if (m[k] != 0) n_dir[dir_of(sx[k], sy[k])]++;
      end
      foreach (ref_y[k]) if (ref_v[k] && ref_y[k] == 0 && k >= W + 3 && v[k-W-3] && m[k-W-3] != 0) n_supp++;
    end
    $display("canny mechanisms: saturated=%0d dirs=%p suppressed=%0d edges=%0d weak kept=%0d weak dropped=%0d frames with label merges=%0d pass-2 pixels during input=%0d dropped frames=%0d",
             n_sat, n_dir, n_supp, n_keep, n_wk, n_wd, n_pairs, n_overlap, n_drop);
    check(n_sat > 0, "no saturated magnitude");
    foreach (n_dir[d]) check(n_dir[d] > 0, $sformatf("direction %0d never seen", d));
    check(n_supp > 0, "no suppressed pixel");
    check(n_wk > 0 && n_wd > 0, "weak pixels not both kept and dropped");
    check(n_pairs > 0, "no label merge");
    check(n_overlap > 0, "pass 2 never overlapped the next frame");
    check(n_drop == 0, $sformatf("%0d dropped frames", n_drop));
    done = 1'b1;
  end
endmodule
