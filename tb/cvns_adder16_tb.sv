// cvns_adder16_tb: self-checking test of one 16-bit CVNS slice.
//
// Drives directed corner operands (all-ones propagate chains, carries out of
// each group) and random operands in both the 16-bit and the split byte
// configuration. Expected sums, byte carries and the slice truncation pair
// come from plain integer addition:
//   16-bit: z = x + y + cin,      cout[0] = carry out of bit 7, cout[1] of bit 15
//   bytes : z[7:0] = xl + yl + cin, z[15:8] = xh + yh + in8
//   slice.gt = (x + y >= 2^16), slice.gt | slice.rt = (x + y + 1 >= 2^16),
// i.e. the slice pair yields the right carry out for either carry input
// (rt itself may be 0 when gt is 1, since it is the product of group rt).
// A watchdog ends the run if it stalls.
module cvns_adder16_tb;
  import cvns_pkg::*;

  logic [15:0] x, y, z;
  logic        cin, in8, ctrl8;
  trunc_t      slice;
  logic [1:0]  cout;
  int          checks = 0, failures = 0;

  cvns_adder16 dut (.x(x), .y(y), .cin(cin), .in8(in8), .ctrl8(ctrl8),
                    .z(z), .slice(slice), .cout(cout));

  task automatic check_one(input logic [15:0] a, input logic [15:0] b,
                           input logic c0, input logic c8, input logic split);
    logic [16:0] full;
    logic [8:0]  lo, hi;
    logic [15:0] exp_z;
    logic [1:0]  exp_c;
    x = a; y = b; cin = c0; in8 = c8; ctrl8 = split;
    #1;
    full = 17'(a) + 17'(b) + 17'(c0);
    lo   = 9'(a[7:0]) + 9'(b[7:0]) + 9'(c0);
    hi   = 9'(a[15:8]) + 9'(b[15:8]) + 9'(split ? c8 : lo[8]);
    exp_z = {hi[7:0], lo[7:0]};
    exp_c = {hi[8], lo[8]};
    checks++;
    if (z !== exp_z || cout !== exp_c) begin
      failures++;
      $display("FAIL x=%h y=%h cin=%b in8=%b ctrl8=%b: z=%h cout=%b expected %h %b",
               a, b, c0, c8, split, z, cout, exp_z, exp_c);
    end
    checks++;
    if (slice.gt !== (17'(a) + 17'(b) >= 17'h10000) ||
        (slice.gt | slice.rt) !== (17'(a) + 17'(b) >= 17'h0ffff)) begin
      failures++;
      $display("FAIL slice x=%h y=%h: gt=%b rt=%b", a, b, slice.gt, slice.rt);
    end
    if (!split && full[16] !== exp_c[1]) begin
      failures++;
      $display("FAIL reference mismatch");
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int c = 0; c < 4; c++) begin
        check_one(16'hffff, 16'h0000, c[0], c[1], s[0]);
        check_one(16'hffff, 16'h0001, c[0], c[1], s[0]);
        check_one(16'h00ff, 16'h0000, c[0], c[1], s[0]);
        check_one(16'h7fff, 16'h7fff, c[0], c[1], s[0]);
        check_one(16'h8000, 16'h8000, c[0], c[1], s[0]);
        check_one(16'h0f0f, 16'h00f1, c[0], c[1], s[0]);
        check_one(16'h0fff, 16'hf000, c[0], c[1], s[0]);
      end
      // one operand pair per position of a single carry source
      for (int g = 0; g < 16; g++) begin
        check_one(16'(1) << g, 16'(1) << g, 1'b0, 1'b0, s[0]);
        check_one(16'hffff >> g, 16'(1), 1'b0, 1'b1, s[0]);
      end
    end
    for (int n = 0; n < 20000; n++) begin
      check_one(16'($urandom), 16'($urandom), 1'($urandom), 1'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
