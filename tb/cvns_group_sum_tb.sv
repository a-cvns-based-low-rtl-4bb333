// cvns_group_sum_tb: exhaustive check of the 4-bit group output stage.
//
// For every operand pair and both values of the truncation signal the four
// result bits must equal the low four bits of x + y + tr. A watchdog ends the
// run if it stalls.
module cvns_group_sum_tb;
  logic [3:0] x, y, z;
  logic       tr;
  int         checks = 0, failures = 0;

  cvns_group_sum #(.PSI(4)) dut (.x(x), .y(y), .tr(tr), .z(z));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int a = 0; a < 16; a++) begin
        for (int b = 0; b < 16; b++) begin
          x  = 4'(a);
          y  = 4'(b);
          tr = 1'(c);
          #1;
          checks++;
          if (z !== 4'(a + b + c)) begin
            failures++;
            $display("FAIL x=%0d y=%0d tr=%0d: z=%0d", a, b, c, z);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
