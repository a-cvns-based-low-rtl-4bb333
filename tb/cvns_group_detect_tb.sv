// cvns_group_detect_tb: exhaustive check of the 4-bit group detector.
//
// For all 256 operand pairs the group digit (x + y) / 8 is compared with the
// thresholds 2 and 1.875 in real arithmetic, independent of the integer form
// the detector uses. A watchdog ends the run if it stalls.
module cvns_group_detect_tb;
  logic [3:0] x, y;
  logic       gt, rt;
  int         checks = 0, failures = 0;

  cvns_group_detect #(.PSI(4)) dut (.x(x), .y(y), .gt(gt), .rt(rt));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        real digit;
        x = 4'(a);
        y = 4'(b);
        digit = real'(a + b) / 8.0;
        #1;
        checks++;
        if (gt !== (digit >= 2.0) || rt !== (digit >= 1.875)) begin
          failures++;
          $display("FAIL x=%0d y=%0d: gt=%b rt=%b", a, b, gt, rt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
