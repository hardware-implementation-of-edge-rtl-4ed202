// isys_mem: on-chip "in system" block RAM, one port.
//
// A synchronous single-port RAM with the four pins of a block-RAM macro:
// address, data, write enable and clock. On every rising clock edge the word
// at `addr` is registered onto `dout` (one clock of read latency); when `we`
// is high the same edge also writes `din` to `addr`, and `dout` then shows the
// word as it was before the write. The bidirectional data pin of a block RAM
// is split here into `din` and `dout`.
//
// The engine uses two of these: one holds the input image (written by the
// host, read by the address generator) and one holds the edge map (written
// by the edge detector, read by the host). The contents are not reset.
//
// The pin set and the clock-edge read follow the published architecture;
// the read-during-write behaviour (old word) is this design's choice.
module isys_mem #(
  parameter int DEPTH = 4096,
  parameter int WIDTH = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
    dout <= mem[addr];
  end

endmodule
