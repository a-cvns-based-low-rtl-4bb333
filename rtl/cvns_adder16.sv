// cvns_adder16: one 16-bit radix-2 CVNS adder slice.
//
// The slice is four 4-bit groups (k = 1..4, group k holding bits 4k-4..4k-1).
// Each group's detector reduces its bits to the truncation pair gt/rt, and
// only three truncation signals are passed between groups:
//   Tr4  = gt1 + rt1 cin
//   Tr8  = ctrl8 ? in8 : gt2 + rt2 gt1 + rt2 rt1 cin
//   Tr12 = gt3 + rt3 Tr8
// Group 1 receives cin directly. Each group's output stage turns its bits and
// its Tr into sum bits. With ctrl8 set the slice works as two independent
// bytes, the upper one taking in8 as its carry input.
// Towards the next slice the slice exports its own truncation pair
//   slice.gt = gt4 + rt4 gt3 + rt4 rt3 gt2 + rt4 rt3 rt2 gt1
//   slice.rt = rt4 rt3 rt2 rt1
// and, formed the same way, the carry out of each byte: cout[0] out of bit 7
// (gt2 + rt2 Tr4), cout[1] out of bit 15 (gt4 + rt4 Tr12).
// The group equations follow the design description; the byte carry outputs
// are this design's addition so that every lane has a carry out.
// Combinational, no clock.
module cvns_adder16
  import cvns_pkg::SLICE_W, cvns_pkg::PSI, cvns_pkg::trunc_t;
(
  input  logic [SLICE_W-1:0] x,
  input  logic [SLICE_W-1:0] y,
  input  logic               cin,    // carry input of the slice (bit 0)
  input  logic               in8,    // carry input of the upper byte (byte mode)
  input  logic               ctrl8,  // 1: split the slice into two bytes
  output logic [SLICE_W-1:0] z,
  output trunc_t             slice,  // truncation pair of the whole slice
  output logic [1:0]         cout    // carry out of bit 7 and of bit 15
);

  localparam int unsigned NG = SLICE_W / PSI;  // 4 groups

  trunc_t          grp [NG];  // grp[k-1] is group k of the description
  logic   [NG-1:0] tr;        // truncation signal into each group

  for (genvar g = 0; g < NG; g++) begin : g_grp
    cvns_group_detect #(.PSI(PSI)) u_detect (
      .x  (x[g*PSI +: PSI]),
      .y  (y[g*PSI +: PSI]),
      .gt (grp[g].gt),
      .rt (grp[g].rt)
    );

    cvns_group_sum #(.PSI(PSI)) u_sum (
      .x  (x[g*PSI +: PSI]),
      .y  (y[g*PSI +: PSI]),
      .tr (tr[g]),
      .z  (z[g*PSI +: PSI])
    );
  end

  always_comb begin
    tr[0] = cin;
    tr[1] = grp[0].gt | (grp[0].rt & cin);
    tr[2] = ctrl8 ? in8
                  : (grp[1].gt | (grp[1].rt & grp[0].gt) | (grp[1].rt & grp[0].rt & cin));
    tr[3] = grp[2].gt | (grp[2].rt & tr[2]);

    slice.gt = grp[3].gt
             | (grp[3].rt & grp[2].gt)
             | (grp[3].rt & grp[2].rt & grp[1].gt)
             | (grp[3].rt & grp[2].rt & grp[1].rt & grp[0].gt);
    slice.rt = grp[3].rt & grp[2].rt & grp[1].rt & grp[0].rt;

    cout[0] = grp[1].gt | (grp[1].rt & tr[1]);
    cout[1] = grp[3].gt | (grp[3].rt & tr[3]);
  end

endmodule
