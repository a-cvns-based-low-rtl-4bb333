// cvns_adder64: reconfigurable 64-bit CVNS adder (top level).
//
// Four 16-bit CVNS slices add x and y; the mode bits part1/part2 cut the
// 64-bit word into lanes:
//   {part1,part2} = 00  eight 8-bit additions
//                   01  four 16-bit additions
//                   10  two 32-bit additions
//                   11  one 64-bit addition
// Inside a slice, carries between 4-bit groups are replaced by truncation
// signals derived from analog-style group digits (see cvns_adder16); between
// slices, cvns_carry_link forms each slice's carry input by look-ahead from
// the slices' truncation pairs.
//
// Carry inputs: cin[b] is the carry into byte b (bit 8b). Only the carry
// input of the lowest byte of each lane is used; the others are ignored in
// that mode. Carry outputs: cout[b] is the carry out of bit 8b+7, computed in
// every mode; the carry out of a lane is cout of its top byte.
// Purely combinational: z and cout settle after the look-ahead and output
// XOR delay, with no clock or latency.
//
// The slice/lane structure, the mode encoding and the carry equations follow
// the design description. The per-byte carry inputs and outputs as vectors
// are this design's interface choice.
module cvns_adder64
  import cvns_pkg::*;
(
  input  logic [WIDTH-1:0]   x,
  input  logic [WIDTH-1:0]   y,
  input  logic               part1,
  input  logic               part2,
  input  logic [N_BYTES-1:0] cin,
  output logic [WIDTH-1:0]   z,
  output logic [N_BYTES-1:0] cout
);

  ctrl_t                 ctrl;
  trunc_t                slice  [N_SLICES];
  logic   [N_SLICES-1:0] cin_sl;            // carry into each slice

  cvns_mode_ctrl u_mode (
    .part1 (part1),
    .part2 (part2),
    .ctrl  (ctrl)
  );

  cvns_carry_link u_link (
    .slice  (slice),
    .in0    (cin[0]),
    .in16   (cin[2]),
    .in32   (cin[4]),
    .in48   (cin[6]),
    .ctrl32 (ctrl.ctrl32),
    .ctrl64 (ctrl.ctrl64),
    .cin16  (cin_sl[1]),
    .cin32  (cin_sl[2]),
    .cin48  (cin_sl[3])
  );

  assign cin_sl[0] = cin[0];

  for (genvar s = 0; s < N_SLICES; s++) begin : g_slice
    cvns_adder16 u_add16 (
      .x     (x[s*SLICE_W +: SLICE_W]),
      .y     (y[s*SLICE_W +: SLICE_W]),
      .cin   (cin_sl[s]),
      .in8   (cin[2*s+1]),
      .ctrl8 (ctrl.ctrl8),
      .z     (z[s*SLICE_W +: SLICE_W]),
      .slice (slice[s]),
      .cout  (cout[2*s +: 2])
    );
  end

endmodule
