// hex_pkg: types shared by the CLAP edge-detection engine.
//
// lattice_e selects how the three image rows of a window are read: on the
// hexagonal lattice the odd image rows are taken to sit half a pixel to the
// right of the even rows, so the two outer rows of a window are read either
// in the same column as the middle row ("right-edge" addressing) or one
// column behind it ("left-edge" addressing). On the rectangular lattice all
// three rows are always read in the same column.
//
// sel_e is the 2-bit code of the selection counter that steers the 1:3
// demultiplexer into R1, R2 and R3 (codes 00, 01 and 10).
//
// The codes and the two addressing patterns follow the published
// architecture; the rectangular mode as a plain column-aligned read is this
// design's reading of it.
package hex_pkg;

  typedef enum logic {
    LAT_HEX  = 1'b0,
    LAT_RECT = 1'b1
  } lattice_e;

  typedef enum logic [1:0] {
    SEL_R1 = 2'b00,  // top row of the window
    SEL_R2 = 2'b01,  // middle row (holds the centre pixel)
    SEL_R3 = 2'b10   // bottom row
  } sel_e;

endpackage
