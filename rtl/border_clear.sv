// border_clear: writes zero to the output-image pixels no window is centred on.
//
// The scan produces results only for rows 1 .. IMG_H-2 and columns
// 0 .. IMG_W-2. The remaining pixels (row 0, row IMG_H-1 and column IMG_W-1
// of the rows in between, 2*IMG_W + IMG_H-2 pixels) are written with 0 by
// this counter so that the edge map holds no stale data. It uses the
// output memory's free clocks: it offers one write per clock (`wr_req`,
// `wr_addr`) and advances only when `grant` is high, which the engine gives
// whenever the edge detector is not writing (two clocks out of three during
// a scan). `start` restarts the list; `done` is high once it is finished.
//
// This block is an addition of this design; the published architecture
// does not say what is stored for the border pixels.
module border_clear #(
  parameter int IMG_W = 64,
  parameter int IMG_H = 64,
  localparam int AW   = $clog2(IMG_W * IMG_H),
  localparam int NB   = 2 * IMG_W + IMG_H - 2,
  localparam int KW   = $clog2(NB + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          grant,
  output logic          wr_req,
  output logic [AW-1:0] wr_addr,
  output logic          done
);

  logic [KW-1:0] k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                k <= KW'(NB);
    else if (start)            k <= '0;
    else if (wr_req && grant)  k <= k + KW'(1);
  end

  assign done   = (k == KW'(NB));
  assign wr_req = !done;

  always_comb begin
    if (k < KW'(IMG_W))
      wr_addr = AW'(k);                                            // row 0
    else if (k < KW'(2 * IMG_W))
      wr_addr = AW'((IMG_H - 1) * IMG_W) + AW'(k - KW'(IMG_W));    // last row
    else
      wr_addr = (AW'(k - KW'(2 * IMG_W)) + AW'(1)) * AW'(IMG_W) + AW'(IMG_W - 1);
  end

endmodule
