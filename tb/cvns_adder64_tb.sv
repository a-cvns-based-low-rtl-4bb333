// cvns_adder64_tb: end-to-end test of the reconfigurable 64-bit CVNS adder.
//
// Runs all four lane configurations (eight bytes, four half-words, two words,
// one double word) with directed and random operands and checks every sum bit
// and every byte carry out against a bit-serial ripple reference that restarts
// the carry at each lane boundary from that lane's carry input. It also
// checks each lane's sum against integer addition.
//
// Mechanism coverage, each counted and required at least once:
//   - each of the four modes
//   - a carry generated inside a 4-bit group crossing to the next group
//   - a carry crossing a group purely by propagation (group sum 1111)
//   - a byte boundary cut in byte mode while the lower byte carries out
//   - a carry crossing a slice boundary in word / double-word mode
//   - a carry crossing bit 32 in double-word mode
//   - a carry rippling through the full 64-bit word (all-ones propagate)
// The adder is combinational; the test waits 1 time unit per vector.
// A watchdog ends the run if it stalls.
module cvns_adder64_tb;
  import cvns_pkg::*;

  logic [63:0] x, y, z;
  logic        part1, part2;
  logic [7:0]  cin, cout;
  int          checks = 0, failures = 0;

  int n_mode [4];
  int n_group_gen, n_group_prop, n_byte_cut, n_slice_join, n_half_join, n_full_prop;

  cvns_adder64 dut (.x(x), .y(y), .part1(part1), .part2(part2), .cin(cin),
                    .z(z), .cout(cout));

  function automatic int lane_bits(input mode_e m);
    case (m)
      MODE_BYTE: return 8;
      MODE_HALF: return 16;
      MODE_WORD: return 32;
      default:   return 64;
    endcase
  endfunction

  task automatic apply(input logic [63:0] a, input logic [63:0] b,
                       input mode_e m, input logic [7:0] c);
    int          lw;
    logic        carry;
    logic [63:0] exp_z;
    logic [7:0]  exp_c;
    logic [64:0] carry_in;   // carry into each bit position
    logic [63:0] lsum;
    x = a; y = b; cin = c; {part1, part2} = m;
    #1;
    lw    = lane_bits(m);
    carry = 1'b0;
    for (int i = 0; i < 64; i++) begin
      if (i % lw == 0) carry = c[i/8];
      carry_in[i] = carry;
      exp_z[i] = a[i] ^ b[i] ^ carry;
      carry    = (a[i] & b[i]) | (a[i] & carry) | (b[i] & carry);
      if (i % 8 == 7) exp_c[i/8] = carry;
    end
    carry_in[64] = carry;
    checks++;
    if (z !== exp_z || cout !== exp_c) begin
      failures++;
      $display("FAIL mode=%s x=%h y=%h cin=%b: z=%h cout=%b expected %h %b",
               m.name(), a, b, c, z, cout, exp_z, exp_c);
    end
    // lane sums by integer addition
    for (int l = 0; l < 64 / lw; l++) begin
      logic [64:0] s;
      logic [63:0] mask;
      mask = (lw == 64) ? '1 : ((64'(1) << lw) - 1);
      s    = 65'((a >> (l*lw)) & mask) + 65'((b >> (l*lw)) & mask) + 65'(c[l*lw/8]);
      checks++;
      if (((z >> (l*lw)) & mask) !== (s[63:0] & mask) || cout[(l+1)*lw/8-1] !== s[lw]) begin
        failures++;
        $display("FAIL lane %0d mode=%s: sum mismatch", l, m.name());
      end
    end
    // coverage
    n_mode[m]++;
    for (int g = 1; g < 16; g++) begin
      int lo;
      lo = 4*g;
      if (lo % lw == 0) continue;
      if (({1'b0, a[lo-4 +: 4]} + {1'b0, b[lo-4 +: 4]}) >= 5'd16) n_group_gen++;
      if ((a[lo-4 +: 4] ^ b[lo-4 +: 4]) == 4'hf && carry_in[lo-4] && carry_in[lo]) n_group_prop++;
    end
    if (m == MODE_BYTE)
      for (int bb = 0; bb < 8; bb++) if (bb % 2 == 0 && exp_c[bb]) n_byte_cut++;
    if (m == MODE_WORD || m == MODE_DWORD)
      if (carry_in[16] || carry_in[48]) n_slice_join++;
    if (m == MODE_DWORD && carry_in[32]) n_half_join++;
    if (m == MODE_DWORD && (a ^ b) == '1 && c[0] && carry_in[64]) n_full_prop++;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_group_gen = 0; n_group_prop = 0; n_byte_cut = 0;
    n_slice_join = 0; n_half_join = 0; n_full_prop = 0;
    for (int m = 0; m < 4; m++) n_mode[m] = 0;
    for (int m = 0; m < 4; m++) begin
      mode_e md;
      md = mode_e'(m);
      apply('1, 64'd0, md, 8'hff);
      apply('1, 64'd1, md, 8'h00);
      apply(64'h5555_5555_5555_5555, 64'haaaa_aaaa_aaaa_aaaa, md, 8'h01);
      apply(64'h8080_8080_8080_8080, 64'h8080_8080_8080_8080, md, 8'h00);
      apply(64'h00ff_00ff_00ff_00ff, 64'h0001_0001_0001_0001, md, 8'h00);
      apply(64'h7fff_ffff_7fff_ffff, 64'h0000_0001_0000_0001, md, 8'h00);
      apply(64'hffff_fffe_ffff_ffff, 64'h0000_0001_0000_0000, md, 8'h11);
      for (int i = 0; i < 64; i++) begin
        apply(64'(1) << i, 64'(1) << i, md, 8'h00);
        apply(~(64'(1) << i), 64'(1), md, 8'($urandom));
      end
      for (int n = 0; n < 5000; n++) begin
        apply({$urandom, $urandom}, {$urandom, $urandom}, md, 8'($urandom));
      end
    end
    for (int n = 0; n < 20000; n++) begin
      apply({$urandom, $urandom}, {$urandom, $urandom}, mode_e'($urandom_range(3, 0)),
            8'($urandom));
    end
    $display("coverage: modes byte=%0d half=%0d word=%0d dword=%0d", n_mode[0], n_mode[1],
             n_mode[2], n_mode[3]);
    $display("coverage: group_generate=%0d group_propagate=%0d byte_cut=%0d", n_group_gen,
             n_group_prop, n_byte_cut);
    $display("coverage: slice_join=%0d half_join=%0d full_64bit_propagate=%0d", n_slice_join,
             n_half_join, n_full_prop);
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (n_mode[m] == 0) begin failures++; $display("FAIL mode %0d never run", m); end
    end
    checks++; if (n_group_gen  == 0) begin failures++; $display("FAIL no group generate"); end
    checks++; if (n_group_prop == 0) begin failures++; $display("FAIL no group propagate"); end
    checks++; if (n_byte_cut   == 0) begin failures++; $display("FAIL no byte cut"); end
    checks++; if (n_slice_join == 0) begin failures++; $display("FAIL no slice join"); end
    checks++; if (n_half_join  == 0) begin failures++; $display("FAIL no 32-bit join"); end
    checks++; if (n_full_prop  == 0) begin failures++; $display("FAIL no 64-bit propagate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
