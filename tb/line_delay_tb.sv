// line_delay_tb: checks that the line FIFO returns each word exactly DEPTH
// enables later (register case DEPTH=1 and a RAM case), with enables that
// come irregularly, and that dout holds while en is low.
module line_delay_tb;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] din = '0, d1, d5, d7;
  int checks = 0, failures = 0;
  int hist[$];

  line_delay #(.WIDTH(8), .DEPTH(1)) dut1 (.clk, .rst_n, .en, .din, .dout(d1));
  line_delay #(.WIDTH(8), .DEPTH(5)) dut5 (.clk, .rst_n, .en, .din, .dout(d5));
  line_delay #(.WIDTH(8), .DEPTH(7)) dut7 (.clk, .rst_n, .en, .din, .dout(d7));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    logic [7:0] h5, h7;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 2) != 0);
      din = 8'($urandom);
      h5  = d5;
      h7  = d7;
      if (en) hist.push_back(din);
      @(posedge clk);
      #1;
      if (en) begin
        automatic int k = hist.size() - 1;
        check(d1, hist[k], "depth 1");
        if (k >= 4) check(d5, hist[k-4], "depth 5");
        if (k >= 6) check(d7, hist[k-6], "depth 7");
      end else begin
        check(d5, h5, "depth 5 hold");
        check(d7, h7, "depth 7 hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
