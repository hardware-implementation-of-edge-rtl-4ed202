// clap_comparator: one CLAP basis-structure test.
//
// Takes the N pixels of one polygon (basis structure) of the window, finds
// their largest and smallest gray value, forms the gray distance
// D = max - min and raises `edge_o` when D is greater than the threshold
// `thr` (D <= thr gives 0). Purely combinational; no multipliers, only
// magnitude comparators and one subtractor.
//
// This is the CLAP comparator as published; the parameterised number of
// inputs lets one module serve the three- and four-pixel polygons.
module clap_comparator #(
  parameter int N     = 3,
  parameter int PIX_W = 8
) (
  input  logic [PIX_W-1:0] px [N],
  input  logic [PIX_W-1:0] thr,
  output logic [PIX_W-1:0] gmax,
  output logic [PIX_W-1:0] gmin,
  output logic [PIX_W-1:0] gdist,
  output logic             edge_o
);

  always_comb begin
    gmax = px[0];
    gmin = px[0];
    for (int i = 1; i < N; i++) begin
      if (px[i] > gmax) gmax = px[i];
      if (px[i] < gmin) gmin = px[i];
    end
    gdist  = gmax - gmin;
    edge_o = (gdist > thr);
  end

endmodule
