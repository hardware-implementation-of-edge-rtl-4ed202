// edge_detect: the five CLAP comparators C1..C5 and their combination.
//
// Each comparator tests one basis structure (polygon) of the hexagonal
// window held in the S_block:
//   C1: S12, S21, S32
//   C2: S11, S31, S23
//   C3: S11, S21, S32, S23
//   C4: S12, S21, S31, S23
//   C5: S12, S11, S31, S32
// A comparator gives 1 when the gray distance of its polygon exceeds the
// threshold. CLAP clears the centre pixel as soon as one basis structure is
// uniform (distance <= threshold), so the centre is marked as an edge
// (`edge_o` = 1) only when all five comparators give 1; this AND is this
// design's reading of the combining gate. The centre register S22 itself is
// in none of the polygons. Combinational.
module edge_detect #(
  parameter int PIX_W = 8
) (
  input  logic [PIX_W-1:0] s11,
  input  logic [PIX_W-1:0] s12,
  input  logic [PIX_W-1:0] s21,
  input  logic [PIX_W-1:0] s23,
  input  logic [PIX_W-1:0] s31,
  input  logic [PIX_W-1:0] s32,
  input  logic [PIX_W-1:0] thr,
  output logic [4:0]       c,       // c[k-1] is the result of comparator Ck
  output logic             edge_o
);

  logic [PIX_W-1:0] p1 [3];
  logic [PIX_W-1:0] p2 [3];
  logic [PIX_W-1:0] p3 [4];
  logic [PIX_W-1:0] p4 [4];
  logic [PIX_W-1:0] p5 [4];

  assign p1 = '{s12, s21, s32};
  assign p2 = '{s11, s31, s23};
  assign p3 = '{s11, s21, s32, s23};
  assign p4 = '{s12, s21, s31, s23};
  assign p5 = '{s12, s11, s31, s32};

  // Only the edge flag of each comparator is used here; max, min and the
  // gray distance are left open.
  clap_comparator #(.N(3), .PIX_W(PIX_W)) u_c1 (.px(p1), .thr(thr), .gmax(), .gmin(), .gdist(), .edge_o(c[0]));
  clap_comparator #(.N(3), .PIX_W(PIX_W)) u_c2 (.px(p2), .thr(thr), .gmax(), .gmin(), .gdist(), .edge_o(c[1]));
  clap_comparator #(.N(4), .PIX_W(PIX_W)) u_c3 (.px(p3), .thr(thr), .gmax(), .gmin(), .gdist(), .edge_o(c[2]));
  clap_comparator #(.N(4), .PIX_W(PIX_W)) u_c4 (.px(p4), .thr(thr), .gmax(), .gmin(), .gdist(), .edge_o(c[3]));
  clap_comparator #(.N(4), .PIX_W(PIX_W)) u_c5 (.px(p5), .thr(thr), .gmax(), .gmin(), .gdist(), .edge_o(c[4]));

  assign edge_o = &c;

endmodule
