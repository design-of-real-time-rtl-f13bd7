// hyst_threshold_tb: random 8x6 frames with background, weak and strong
// pixels (and values exactly at the thresholds) go through the two-pass
// labeling threshold back to back; each edge image is compared with an
// 8-connected flood fill from the strong pixels. Frame density varies so that
// chains of weak pixels, label merges and isolated pixels all occur. Some
// frames come with a pixel on every clock, faster than resolve and pass 2 of
// the previous frame can finish, so they must be dropped and reported; the
// others have gaps and must all come out. A second instance with a tiny label
// table must flag overflow on dense frames and still be exact on frames where
// it does not. The pass-2 output rate (one pixel per clock) is checked.
module hyst_threshold_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import edge_pkg::*;
  import edge_ref_pkg::*;
  localparam int W = 8, H = 6, NPX = W * H, NF = 300;
  localparam int LO = 50, HI = 150;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, sof = 1'b0;
  pixel_t din = '0;
  logic v_a, e_a, l_a, b_a, d_a, o_a;
  logic v_b, e_b, l_b, b_b, d_b, o_b;
  int checks = 0, failures = 0;
  int last_sent = -1;
  int cur_a[$], cur_b[$];
  int res_a[$][$], res_b[$][$];
  int ovf_a[$], ovf_b[$];
  int drop_a[$], drop_b[$];
  int t_first_a = 0, n_rate_bad = 0;
  int n_ovf = 0, n_exact_small = 0, n_weak_kept = 0, n_weak_dropped = 0;

  hyst_threshold #(.IMG_W(W), .IMG_H(H), .MAX_LABELS(64), .MAX_PAIRS(64)) dut_a (
    .clk, .rst_n, .en, .sof, .din, .th_low(8'(LO)), .th_high(8'(HI)),
    .out_valid(v_a), .out_edge(e_a), .out_last(l_a), .busy(b_a), .frame_dropped(d_a), .overflow(o_a));
  hyst_threshold #(.IMG_W(W), .IMG_H(H), .MAX_LABELS(4), .MAX_PAIRS(2)) dut_b (
    .clk, .rst_n, .en, .sof, .din, .th_low(8'(LO)), .th_high(8'(HI)),
    .out_valid(v_b), .out_edge(e_b), .out_last(l_b), .busy(b_b), .frame_dropped(d_b), .overflow(o_b));

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (v_a) begin
      if (cur_a.size() == 0) t_first_a = $time;
      cur_a.push_back(int'(e_a));
    end
    if (v_b) cur_b.push_back(int'(e_b));
    if (l_a) begin
      if ($time - t_first_a != 10 * (NPX - 1)) n_rate_bad++;
      res_a.push_back(cur_a); cur_a.delete(); ovf_a.push_back(int'(o_a));
    end
    if (l_b) begin
      res_b.push_back(cur_b); cur_b.delete(); ovf_b.push_back(int'(o_b));
    end
    if (d_a) drop_a.push_back(last_sent);
    if (d_b) drop_b.push_back(last_sent);
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    stream_t imgs[NF];
    stream_t ref_e;
    int dens, r, fast;
    int acc_a[$], acc_b[$];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++) begin
      imgs[f] = new[NPX];
      dens = $urandom_range(5, 70);
      foreach (imgs[f][i]) begin
        r = $urandom_range(0, 99);
        if (r >= dens)          imgs[f][i] = $urandom_range(0, LO);
        else if (r < dens / 5)  imgs[f][i] = (r % 3 == 0) ? HI + 1 : $urandom_range(HI + 1, 255);
        else                    imgs[f][i] = (r % 4 == 0) ? HI : $urandom_range(LO + 1, HI);
      end
      fast = (f % 7 == 3);
      for (int i = 0; i < NPX; i++) begin
        @(negedge clk);
        en = 1'b1; sof = (i == 0); din = pixel_t'(imgs[f][i]);
        @(posedge clk);
        if (i == NPX - 1) last_sent = f;
        if (!fast) begin
          @(negedge clk);
          en = 1'b0; sof = 1'b0;
          repeat ($urandom_range(0, 2)) @(negedge clk);
        end
      end
    end
    @(negedge clk);
    en = 1'b0; sof = 1'b0;
    wait (!b_a && !b_b);
    repeat (5) @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      if (!(f inside {drop_a})) acc_a.push_back(f);
      if (!(f inside {drop_b})) acc_b.push_back(f);
    end
    check(drop_a.size() > 0, "no frame was dropped");
    foreach (drop_a[i]) check(drop_a[i] % 7 == 3, $sformatf("frame %0d dropped though it had gaps", drop_a[i]));
    check(res_a.size() == acc_a.size(), $sformatf("%0d frames out, %0d accepted", res_a.size(), acc_a.size()));
    check(res_b.size() == acc_b.size(), "small instance frame count");
    check(n_rate_bad == 0, "pass 2 not one pixel per clock");
    for (int j = 0; j < acc_a.size() && j < res_a.size(); j++) begin
      automatic int f = acc_a[j];
      hyst(imgs[f], W, H, LO, HI, ref_e);
      check(ovf_a[j] == 0, "unexpected overflow in the large table");
      for (int i = 0; i < NPX; i++) begin
        check(res_a[j][i] == ref_e[i], $sformatf("frame %0d pixel %0d got %0d exp %0d", f, i, res_a[j][i], ref_e[i]));
        if (imgs[f][i] > LO && imgs[f][i] <= HI) begin
          if (ref_e[i] != 0) n_weak_kept++; else n_weak_dropped++;
        end
      end
    end
    for (int j = 0; j < acc_b.size() && j < res_b.size(); j++) begin
      automatic int f = acc_b[j];
      if (ovf_b[j] != 0) n_ovf++;
      else begin
        n_exact_small++;
        hyst(imgs[f], W, H, LO, HI, ref_e);
        for (int i = 0; i < NPX; i++)
          check(res_b[j][i] == ref_e[i], $sformatf("small table frame %0d pixel %0d", f, i));
      end
    end
    check(n_ovf > 0 && n_exact_small > 0 && n_weak_kept > 0 && n_weak_dropped > 0,
          $sformatf("coverage ovf=%0d exact=%0d weak kept=%0d dropped=%0d",
                    n_ovf, n_exact_small, n_weak_kept, n_weak_dropped));
    $display("frames dropped: %0d of %0d", drop_a.size(), NF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
