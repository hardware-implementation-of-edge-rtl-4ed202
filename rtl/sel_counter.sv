// sel_counter: selection counter of the 1:3 demultiplexer.
//
// A modulo-3 counter that steps 00 -> 01 -> 10 -> 00 on every clock in which
// `en` is high, so that three consecutive memory words land in R1, R2 and
// R3. `clr` (synchronous) and the asynchronous active-low reset return it to
// 00. `last` is high while the count is 10, i.e. in the cycle whose word
// completes a column of the window.
//
// The three codes and their mapping to R1..R3 follow the published
// architecture; the enable and the synchronous clear, which keep the counter
// in step with the address generator, are this design's additions.
module sel_counter
  import hex_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  output sel_e sel,
  output logic last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       sel <= SEL_R1;
    else if (clr)     sel <= SEL_R1;
    else if (en) begin
      unique case (sel)
        SEL_R1:  sel <= SEL_R2;
        SEL_R2:  sel <= SEL_R3;
        default: sel <= SEL_R1;
      endcase
    end
  end

  assign last = (sel == SEL_R3);

endmodule
