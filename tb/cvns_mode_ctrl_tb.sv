// cvns_mode_ctrl_tb: exhaustive check of the mode decoder.
//
// Applies the four {part1,part2} codes and compares ctrl8/ctrl32/ctrl64 with
// the expected partitioning of each lane width: byte mode cuts the slices,
// word and double word join slice pairs, only double word joins the halves.
// A watchdog ends the run if it stalls.
module cvns_mode_ctrl_tb;
  import cvns_pkg::*;

  logic  part1, part2;
  ctrl_t ctrl;
  int    checks = 0, failures = 0;

  cvns_mode_ctrl dut (.part1(part1), .part2(part2), .ctrl(ctrl));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++) begin
      mode_e mode;
      ctrl_t exp;
      mode = mode_e'(m);
      {part1, part2} = 2'(m);
      exp.ctrl8  = (mode == MODE_BYTE);
      exp.ctrl32 = (mode == MODE_WORD) || (mode == MODE_DWORD);
      exp.ctrl64 = (mode == MODE_DWORD);
      #1;
      checks++;
      if (ctrl !== exp) begin
        failures++;
        $display("FAIL mode %0d: ctrl=%b expected %b", m, ctrl, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
