// cvns_carry_link_tb: exhaustive check of the inter-slice carry network.
//
// For each of the three valid control settings (separate slices, joined
// pairs, one joined word) and all combinations of slice truncation pairs and
// external carry inputs, the slice carries are compared with a rippled
// reference: a slice that starts a lane takes its external carry input,
// any other takes gt + rt * (carry into the slice below).
// A watchdog ends the run if it stalls.
module cvns_carry_link_tb;
  import cvns_pkg::*;

  trunc_t slice [N_SLICES];
  logic   in0, in16, in32, in48, ctrl32, ctrl64;
  logic   cin16, cin32, cin48;
  int     checks = 0, failures = 0;

  cvns_carry_link dut (.slice(slice), .in0(in0), .in16(in16), .in32(in32), .in48(in48),
                       .ctrl32(ctrl32), .ctrl64(ctrl64),
                       .cin16(cin16), .cin32(cin32), .cin48(cin48));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 3; m++) begin
      ctrl32 = (m >= 1);
      ctrl64 = (m == 2);
      for (int v = 0; v < (1 << 12); v++) begin
        logic [3:0] c, in_v, start;
        for (int s = 0; s < N_SLICES; s++) begin
          slice[s].gt = v[2*s];
          slice[s].rt = v[2*s+1];
        end
        {in48, in32, in16, in0} = 4'(v >> 8);
        in_v  = {in48, in32, in16, in0};
        start = {~ctrl32, ~ctrl64, ~ctrl32, 1'b1};
        #1;
        c[0] = in0;
        for (int s = 1; s < N_SLICES; s++) begin
          c[s] = start[s] ? in_v[s] : (slice[s-1].gt | (slice[s-1].rt & c[s-1]));
        end
        checks++;
        if ({cin48, cin32, cin16} !== c[3:1]) begin
          failures++;
          $display("FAIL mode %0d v=%h: got %b expected %b", m, v, {cin48, cin32, cin16}, c[3:1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
