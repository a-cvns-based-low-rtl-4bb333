// cvns_mode_ctrl: decodes the two mode bits into the partitioning controls.
//
// Purely combinational. Inputs part1 and part2 select the lane width
// ({part1,part2}: 00 byte, 01 half-word, 10 word, 11 double word). Outputs:
//   ctrl.ctrl8  = ~(part1 | part2)  byte mode: cut every 16-bit slice at bit 8
//   ctrl.ctrl32 =   part1           word or double word: join slice pairs
//   ctrl.ctrl64 =   part1 & part2   double word: join the two 32-bit halves
// The mode table and the ctrl64 expression follow the design description.
// ctrl8 and ctrl32 are written so that they are active exactly in the modes
// where the slices are cut or joined, which is how the carry equations use
// them; this polarity is this design's reading of the mode table.
module cvns_mode_ctrl
  import cvns_pkg::ctrl_t;
(
  input  logic  part1,
  input  logic  part2,
  output ctrl_t ctrl
);

  always_comb begin
    ctrl.ctrl8  = ~(part1 | part2);
    ctrl.ctrl32 = part1;
    ctrl.ctrl64 = part1 & part2;
  end

endmodule
