// addr_gen: address generator and scan sequencer of the edge engine.
//
// One pulse on `start` scans the whole input image once. The image is
// IMG_W x IMG_H pixels stored row by row (address = row*IMG_W + col). The
// scan runs in row bands: the band for centre row r (r = 1 .. IMG_H-2)
// reads rows r-1, r and r+1. Within a band the step counter s runs over the
// columns 0 .. IMG_W-1, and each step takes three clocks, one read per
// clock in the order top row, middle row, bottom row (phase 0, 1, 2). So a
// new read address is issued every clock and a new window column is
// complete every three clocks.
//
// The middle row is always read in column s. The two outer rows are read
//   - in column s ("right-edge" addressing) when the centre row is odd or
//     the lattice is rectangular, and
//   - in column s-1 ("left-edge" addressing) when the centre row is even on
//     the hexagonal lattice.
// With odd rows sitting half a pixel right of even rows, this makes the two
// outer pixels of each window row pair straddle the centre pixel, so the
// seven window registers form a hexagon on both row parities. Column -1
// (left-edge, s = 0) lies outside the image: the read is flagged `rd_pad`
// and its data must be replaced by zero.
//
// Per read the generator also gives the tags that travel with the data:
// `rd_phase` (which R register the word is for), `rd_first` (step 0 of a
// band) and, for the step's result, `res_valid` / `res_addr`: after step s
// the window is centred on pixel (r, s-1), so steps 1 .. IMG_W-1 produce
// the results for columns 0 .. IMG_W-2 of row r.
//
// Timing: the first read is issued in the clock after `start`; the scan
// takes exactly 3*IMG_W*(IMG_H-2) clocks with `rd_en` high. `busy` is high
// during those clocks. `lattice` is sampled on `start`; `start` while busy
// is ignored.
//
// The band-by-band, column-by-column read order and the use of right-edge
// addressing for odd and left-edge addressing for even rows follow the
// published architecture. Realising the two pointers as one step counter
// with a per-band column lag, and the padding flag, are this design's own.
module addr_gen
  import hex_pkg::*;
#(
  parameter int IMG_W = 64,
  parameter int IMG_H = 64,
  localparam int AW   = $clog2(IMG_W * IMG_H),
  localparam int CW   = $clog2(IMG_W),
  localparam int RW   = $clog2(IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  lattice_e      lattice,
  output logic          busy,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  output logic          rd_pad,
  output sel_e          rd_phase,
  output logic          rd_first,
  output logic          res_valid,
  output logic [AW-1:0] res_addr,
  output logic          right_edge   // addressing used by the current band
);

  logic          active;
  logic [RW-1:0] row;    // centre row of the band
  logic [CW-1:0] step;   // middle-row column
  sel_e          phase;
  lattice_e      lat_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      row    <= RW'(1);
      step   <= '0;
      phase  <= SEL_R1;
      lat_q  <= LAT_HEX;
    end else if (!active) begin
      if (start) begin
        active <= 1'b1;
        row    <= RW'(1);
        step   <= '0;
        phase  <= SEL_R1;
        lat_q  <= lattice;
      end
    end else begin
      unique case (phase)
        SEL_R1:  phase <= SEL_R2;
        SEL_R2:  phase <= SEL_R3;
        default: begin
          phase <= SEL_R1;
          if (step == CW'(IMG_W - 1)) begin
            step <= '0;
            if (row == RW'(IMG_H - 2)) active <= 1'b0;
            else                       row    <= row + RW'(1);
          end else begin
            step <= step + CW'(1);
          end
        end
      endcase
    end
  end

  // Row and column of the current read.
  logic          outer_lag;   // outer rows read one column behind
  logic [RW-1:0] rd_row;
  logic [CW-1:0] rd_col;

  always_comb begin
    right_edge = (lat_q == LAT_RECT) || row[0];
    outer_lag  = (phase != SEL_R2) && !right_edge;
    unique case (phase)
      SEL_R1:  rd_row = row - RW'(1);
      SEL_R2:  rd_row = row;
      default: rd_row = row + RW'(1);
    endcase
    rd_col   = outer_lag ? step - CW'(1) : step;
    rd_pad   = outer_lag && (step == '0);
    rd_en    = active;
    rd_addr  = AW'(rd_row) * AW'(IMG_W) + AW'(rd_col);
    rd_phase = phase;
    rd_first = (step == '0);
    res_valid = (step != '0);
    res_addr  = AW'(row) * AW'(IMG_W) + AW'(step - CW'(1));
  end

  assign busy = active;

endmodule
