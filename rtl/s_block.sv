// s_block: the hexagonal window registers.
//
// Seven pixel registers in three shift chains:
//   top    S11 -> S12
//   middle S21 -> S22 -> S23
//   bottom S31 -> S32
// On `load` the column held in R1, R2, R3 enters S11, S21, S31 and the
// older pixels move one place along their chain, so the window slides one
// column to the right. S11/S21/S31 then hold the newest (rightmost) column
// and S22 is the centre pixel; S12 and S11 are its upper neighbours, S23 and
// S21 its left and right neighbours, S32 and S31 its lower neighbours.
// The registers reset to zero. `first` (with `load`) starts a new row band:
// the new column is loaded and every older position is cleared to zero, so
// a window at the left image border sees zeros outside the image.
//
// The register names, the chains and the shift order follow the published
// architecture, as do the zero start state; clearing at every band is this
// design's choice.
module s_block #(
  parameter int PIX_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             first,
  input  logic [PIX_W-1:0] r1,
  input  logic [PIX_W-1:0] r2,
  input  logic [PIX_W-1:0] r3,
  output logic [PIX_W-1:0] s11,
  output logic [PIX_W-1:0] s12,
  output logic [PIX_W-1:0] s21,
  output logic [PIX_W-1:0] s22,
  output logic [PIX_W-1:0] s23,
  output logic [PIX_W-1:0] s31,
  output logic [PIX_W-1:0] s32
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {s11, s12, s21, s22, s23, s31, s32} <= '0;
    end else if (load) begin
      s11 <= r1;
      s21 <= r2;
      s31 <= r3;
      s12 <= first ? '0 : s11;
      s22 <= first ? '0 : s21;
      s23 <= first ? '0 : s22;
      s32 <= first ? '0 : s31;
    end
  end

endmodule
