// demux_rblock: 1:3 demultiplexer and the R_block registers R1, R2, R3.
//
// In every clock in which `en` is high the incoming pixel `din` is written
// into the one R register picked by the selection code `sel` (00 -> R1,
// 01 -> R2, 10 -> R3); the other two keep their value. After three enabled
// clocks R1..R3 hold one column of the three-row window (top, middle,
// bottom), ready to be moved into the S_block at once. `full` is a
// registered flag, high for the one clock after R3 was written. All
// registers reset to zero.
//
// The demultiplexer and the three R registers follow the published
// architecture; the `full` flag is this design's way of timing the move.
module demux_rblock
  import hex_pkg::*;
#(
  parameter int PIX_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  sel_e             sel,
  input  logic [PIX_W-1:0] din,
  output logic [PIX_W-1:0] r1,
  output logic [PIX_W-1:0] r2,
  output logic [PIX_W-1:0] r3,
  output logic             full
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1   <= '0;
      r2   <= '0;
      r3   <= '0;
      full <= 1'b0;
    end else begin
      full <= en && (sel == SEL_R3);
      if (en) begin
        unique case (sel)
          SEL_R1:  r1 <= din;
          SEL_R2:  r2 <= din;
          SEL_R3:  r3 <= din;
          default: ;
        endcase
      end
    end
  end

endmodule
