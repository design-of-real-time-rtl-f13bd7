// gauss_conv1d_tb: drives random pixels (with extremes) into a horizontal
// (STRIDE 1) and a strided (STRIDE 3) convolver and compares every output
// with (x0 + 3x1 + 4x2 + 3x3 + x4)/12 computed here.
module gauss_conv1d_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import edge_pkg::*;
  import edge_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  pixel_t din = '0, y1, y3;
  int checks = 0, failures = 0;
  int xs[$], o1[$], o3[$];

  gauss_conv1d #(.STRIDE(1)) dut1 (.clk, .rst_n, .en, .din, .dout(y1));
  gauss_conv1d #(.STRIDE(3)) dut3 (.clk, .rst_n, .en, .din, .dout(y3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stream_t s, r1, r3;
    valid_t  sv, v1, v3;
    int      sel;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      sel = $urandom_range(0, 3);
      din = (sel == 0) ? 8'd255 : (sel == 1) ? 8'd0 : 8'($urandom);
      @(posedge clk);
      #1;
      if (en) begin
        xs.push_back(din);
        o1.push_back(y1);
        o3.push_back(y3);
      end
    end
    s  = new[xs.size()];
    sv = new[xs.size()];
    foreach (s[k]) begin s[k] = xs[k]; sv[k] = 1'b1; end
    conv1d(s, sv, 1, r1, v1);
    conv1d(s, sv, 3, r3, v3);
    foreach (s[k]) begin
      if (v1[k]) begin
        checks++;
        if (o1[k] != r1[k]) begin failures++; $display("FAIL stride1 k=%0d got %0d exp %0d", k, o1[k], r1[k]); end
      end
      if (v3[k]) begin
        checks++;
        if (o3[k] != r3[k]) begin failures++; $display("FAIL stride3 k=%0d got %0d exp %0d", k, o3[k], r3[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
