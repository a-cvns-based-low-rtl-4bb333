// cvns_group_sum: output stage of one PSI-bit group (default 4).
//
// For each bit j of the group the CVNS digit of the bits below it is formed
// by truncated summation: the weighted sum of the pairs (x_i + y_i), i < j,
// inside the same group, plus the group's truncation signal tr standing for
// everything below the group. Halved and compared with 1, that digit gives
// the local carry xy_j; the binary result bit is then x_j XOR y_j XOR xy_j,
// which replaces the modular reduction and the A/D conversion of the plain
// CVNS sum. The truncated form and the XOR output follow the design
// description. The digit is formed here as an integer in units of the group's
// lowest weight, so "digit/2 >= 1" becomes "digit >= 2^j"; that integer form
// stands in for the analog summation, which is not specified at circuit level.
// Combinational, no clock.
module cvns_group_sum #(
  parameter int unsigned PSI = 4
) (
  input  logic [PSI-1:0] x,
  input  logic [PSI-1:0] y,
  input  logic           tr,   // truncation signal into this group
  output logic [PSI-1:0] z
);

  logic [PSI-1:0] xy;   // local carry of each bit, decided from its CVNS digit

  always_comb begin
    for (int unsigned j = 0; j < PSI; j++) begin
      logic [PSI:0] digit;
      digit = (PSI+1)'(tr);
      for (int unsigned i = 0; i < j; i++) begin
        digit = digit + ((PSI+1)'(x[i]) << i) + ((PSI+1)'(y[i]) << i);
      end
      xy[j] = digit >= (PSI+1)'(1 << j);
      z[j]  = x[j] ^ y[j] ^ xy[j];
    end
  end

endmodule
