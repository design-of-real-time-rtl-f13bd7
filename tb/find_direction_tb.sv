// find_direction_tb: exhaustive check over all gradient pairs in -255..255
// against the direction rule evaluated with real arithmetic.
module find_direction_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import edge_pkg::*;
  import edge_ref_pkg::*;
  grad_t sx, sy;
  dir_t  dir;
  int checks = 0, failures = 0;
  int hits[4] = '{0, 0, 0, 0};

  find_direction dut (.sx, .sy, .dir);

  initial begin : watchdog
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int a = -255; a <= 255; a++)
      for (int b = -255; b <= 255; b++) begin
        sx = grad_t'(a);
        sy = grad_t'(b);
        #1;
        exp = dir_of(a, b);
        checks++;
        hits[exp]++;
        if (int'(dir) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL sx=%0d sy=%0d got %0d exp %0d", a, b, dir, exp);
        end
      end
    foreach (hits[i]) begin
      checks++;
      if (hits[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
