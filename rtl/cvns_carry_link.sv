// cvns_carry_link: truncation network between the four 16-bit slices.
//
// The only global information in the adder is the carry into each slice.
// From the slices' truncation pairs (gt, rt) and the external carry inputs
// in0, in16, in32, in48 it forms
//   cin16 = ctrl32 ? gt0 + rt0 in0                      : in16
//   cin32 = ctrl64 ? gt1 + rt1 gt0 + rt1 rt0 in0        : in32
//   cin48 = ctrl32 ? gt2 + rt2 (ctrl64 ? <cin32 term> : in32) : in48
// where index s names slice s (bits 16s..16s+15). All three are two-level
// look-ahead terms; no carry ripples through a slice. The equations follow
// the design description. Combinational, no clock.
module cvns_carry_link
  import cvns_pkg::N_SLICES, cvns_pkg::trunc_t;
(
  input  trunc_t slice [N_SLICES],  // truncation pair of each slice
  input  logic   in0,
  input  logic   in16,
  input  logic   in32,
  input  logic   in48,
  input  logic   ctrl32,
  input  logic   ctrl64,
  output logic   cin16,
  output logic   cin32,
  output logic   cin48
);

  logic join32;  // look-ahead carry into bit 32 from bits 0-31 and in0

  always_comb begin
    join32 = slice[1].gt | (slice[1].rt & slice[0].gt) | (slice[1].rt & slice[0].rt & in0);
    cin16  = ctrl32 ? (slice[0].gt | (slice[0].rt & in0)) : in16;
    cin32  = ctrl64 ? join32 : in32;
    cin48  = ctrl32 ? (slice[2].gt | (slice[2].rt & (ctrl64 ? join32 : in32))) : in48;
  end

endmodule
