// cvns_group_detect: truncation detector of one PSI-bit group (default 4).
//
// In the CVNS adder each group of PSI input bit pairs is turned into one
// continuous-valued digit: every bit drives a D/A converter whose weight is
// 2^(i-PSI+1), the currents are summed, and two comparators test the sum.
//   gt = 1 when the sum is >= 2          (the group carries into the next one)
//   rt = 1 when the sum is >= 2 - 2^(1-PSI) (1.875 for PSI = 4: the group is
//        all ones or more, so an incoming carry would pass through it)
// This module is the exact digital equivalent of that analog front end: the
// weighted sum is formed in units of the lowest weight, so the thresholds
// become 2^PSI and 2^PSI - 1. The thresholds and the group length follow the
// design description; replacing the current-mode circuit by integer logic is
// this implementation's choice, since the circuit itself is not specified.
// Combinational, no clock.
module cvns_group_detect #(
  parameter int unsigned PSI = 4
) (
  input  logic [PSI-1:0] x,
  input  logic [PSI-1:0] y,
  output logic           gt,
  output logic           rt
);

  // Analog digit of the group in units of 2^(1-PSI): sum of (x_i + y_i) 2^i.
  logic [PSI:0] digit;

  always_comb begin
    digit = '0;
    for (int unsigned i = 0; i < PSI; i++) begin
      digit = digit + ((PSI+1)'(x[i]) << i) + ((PSI+1)'(y[i]) << i);
    end
    gt = digit >= (PSI+1)'(1 << PSI);
    rt = digit >= (PSI+1)'((1 << PSI) - 1);
  end

endmodule
