// cvns_pkg: types and constants shared by the CVNS reconfigurable adder.
//
// The adder is 64 bits wide and built from four 16-bit slices, each made of
// four 4-bit groups. The group length (PSI = 4) is the number of input bit
// pairs whose weighted sum one analog CVNS digit has to resolve; it follows
// the design's choice of a 4-bit analog resolution. The lane width of the
// whole adder is selected by two mode bits, part1 and part2:
//   00 byte (eight 8-bit adds), 01 half-word (four 16-bit adds),
//   10 word (two 32-bit adds),  11 double word (one 64-bit add).
// The three partitioning controls derived from them travel together as a
// ctrl_t struct.
package cvns_pkg;

  localparam int unsigned PSI      = 4;   // group length (bits per analog digit)
  localparam int unsigned SLICE_W  = 16;  // width of one CVNS adder slice
  localparam int unsigned N_SLICES = 4;   // slices in the full adder
  localparam int unsigned WIDTH    = SLICE_W * N_SLICES;  // 64
  localparam int unsigned N_BYTES  = WIDTH / 8;           // 8 carry inputs/outputs

  // Lane configuration, encoded as {part1, part2}.
  typedef enum logic [1:0] {
    MODE_BYTE  = 2'b00,
    MODE_HALF  = 2'b01,
    MODE_WORD  = 2'b10,
    MODE_DWORD = 2'b11
  } mode_e;

  // Partitioning controls.
  //   ctrl8  : 1 splits every 16-bit slice into two independent bytes
  //   ctrl32 : 1 joins slice pairs (bits 0-31, 32-63)
  //   ctrl64 : 1 joins the two 32-bit halves
  typedef struct packed {
    logic ctrl8;
    logic ctrl32;
    logic ctrl64;
  } ctrl_t;

  // Truncation (group) signals of one 4-bit group or of one 16-bit slice.
  //   gt : the group's own sum reaches the next group's weight (generates)
  //   rt : the group's sum is all ones or more (passes an incoming carry on)
  typedef struct packed {
    logic gt;
    logic rt;
  } trunc_t;

endpackage
