// edge_hex: CLAP edge detection on a hexagonally resampled image.
//
// The input image (IMG_W x IMG_H pixels of PIX_W bits, row by row) sits in
// an on-chip RAM. A virtual hexagonal grid is formed by treating every odd
// row as shifted half a pixel to the right; no pixel is interpolated, the
// address generator just reads the rows so that each window is a hexagon.
// For every centre pixel the seven-register hexagonal window is tested with
// five basis structures (polygons); a structure is "uniform" when the
// difference between its largest and smallest gray value is at most the
// threshold. The centre is written to the output RAM as 1 (edge) when no
// structure is uniform, else 0.
//
// Datapath, one stage per clock:
//   addr_gen   -> input RAM (one read per clock: top, middle, bottom row)
//   RAM data   -> sel_counter + demux_rblock (R1, R2, R3)
//   R_block    -> s_block (whole column moved every third clock)
//   s_block    -> edge_detect (C1..C5, combinational) -> output RAM write
// so one result is written every three clocks. border_clear zeroes the
// output pixels no window is centred on, in the output RAM's idle clocks.
//
// Interface: pulse `start` with `lattice` (LAT_HEX or LAT_RECT) and
// `threshold` valid; both are sampled then. `busy` is high from the clock
// after `start` until the edge map is complete, and `done` pulses for one
// clock at that point. With IMG_H >= 4 a run takes 3*IMG_W*(IMG_H-2) + 4
// clocks from `start` to `done`.
// While not busy the host owns both RAMs: `ld_we/ld_addr/ld_data` write the
// input image, `rd_addr` reads the edge map, `rd_data` following one clock
// later (synchronous RAM). Host writes while busy are ignored.
//
// The structure (memory, address generator, selection counter and 1:3
// demultiplexer, R and S registers, comparators C1..C5, three clocks per
// pixel) and the 64 x 64 image size follow the published architecture. The
// pixel width, the split into separate input and output RAMs, zero padding
// at the image border, the border clearing, the AND combination of the
// comparators and the host ports are this design's own choices.
module edge_hex
  import hex_pkg::*;
#(
  parameter int IMG_W = 64,
  parameter int IMG_H = 64,
  parameter int PIX_W = 8,
  localparam int AW   = $clog2(IMG_W * IMG_H)
) (
  input  logic             clk,
  input  logic             rst_n,
  // control
  input  logic             start,
  input  lattice_e         lattice,
  input  logic [PIX_W-1:0] threshold,
  output logic             busy,
  output logic             done,
  // host: load the input image
  input  logic             ld_we,
  input  logic [AW-1:0]    ld_addr,
  input  logic [PIX_W-1:0] ld_data,
  // host: read the edge map
  input  logic [AW-1:0]    rd_addr,
  output logic             rd_data
);

  localparam int DEPTH = IMG_W * IMG_H;

  // ---------------------------------------------------------------- control
  logic             start_ok;
  logic [PIX_W-1:0] thr_q;

  assign start_ok = start && !busy;

  // ------------------------------------------------------ address generator
  logic          ag_busy, ag_rd_en, ag_pad, ag_first, ag_res_valid, ag_right_edge;
  logic [AW-1:0] ag_addr, ag_res_addr;
  sel_e          ag_phase;

  addr_gen #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_addr_gen (
    .clk, .rst_n,
    .start     (start_ok),
    .lattice,
    .busy      (ag_busy),
    .rd_en     (ag_rd_en),
    .rd_addr   (ag_addr),
    .rd_pad    (ag_pad),
    .rd_phase  (ag_phase),
    .rd_first  (ag_first),
    .res_valid (ag_res_valid),
    .res_addr  (ag_res_addr),
    .right_edge(ag_right_edge)
  );

  // ------------------------------------------------------- input image RAM
  logic [PIX_W-1:0] in_dout;

  isys_mem #(.DEPTH(DEPTH), .WIDTH(PIX_W)) u_in_mem (
    .clk,
    .we   (ld_we && !busy),
    .addr (busy ? ag_addr : ld_addr),
    .din  (ld_data),
    .dout (in_dout)
  );

  // Tags of the read, delayed by the RAM latency.
  typedef struct packed {
    logic          valid;
    logic          pad;
    sel_e          phase;
    logic          first;
    logic          res_valid;
    logic [AW-1:0] res_addr;
  } rd_tag_t;

  rd_tag_t tag_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tag_d <= '0;
    else        tag_d <= '{valid: ag_rd_en, pad: ag_pad, phase: ag_phase,
                           first: ag_first, res_valid: ag_res_valid,
                           res_addr: ag_res_addr};
  end

  logic [PIX_W-1:0] pix;
  assign pix = tag_d.pad ? '0 : in_dout;

  // -------------------------------------- selection counter, demux, R_block
  sel_e             sel;
  logic             sel_last;
  logic [PIX_W-1:0] r1, r2, r3;
  logic             r_full;

  sel_counter u_sel_counter (
    .clk, .rst_n,
    .clr  (start_ok),
    .en   (tag_d.valid),
    .sel  (sel),
    .last (sel_last)
  );

  demux_rblock #(.PIX_W(PIX_W)) u_demux_rblock (
    .clk, .rst_n,
    .en   (tag_d.valid),
    .sel  (sel),
    .din  (pix),
    .r1, .r2, .r3,
    .full (r_full)
  );

  // Step tags, captured with the word that completes R3.
  logic          st_first, st_res_valid;
  logic [AW-1:0] st_res_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_first     <= 1'b0;
      st_res_valid <= 1'b0;
      st_res_addr  <= '0;
    end else if (tag_d.valid && sel_last) begin
      st_first     <= tag_d.first;
      st_res_valid <= tag_d.res_valid;
      st_res_addr  <= tag_d.res_addr;
    end
  end

  // ---------------------------------------------------------------- S_block
  logic [PIX_W-1:0] s11, s12, s21, s22, s23, s31, s32;

  s_block #(.PIX_W(PIX_W)) u_s_block (
    .clk, .rst_n,
    .load  (r_full),
    .first (st_first),
    .r1, .r2, .r3,
    .s11, .s12, .s21, .s22, .s23, .s31, .s32
  );

  logic          wr_pend;
  logic [AW-1:0] wr_addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pend   <= 1'b0;
      wr_addr_q <= '0;
    end else begin
      wr_pend   <= r_full && st_res_valid;
      wr_addr_q <= st_res_addr;
    end
  end

  // ----------------------------------------------------------- edge detect
  logic [4:0] cmp;
  logic       edge_bit;

  edge_detect #(.PIX_W(PIX_W)) u_edge_detect (
    .s11, .s12, .s21, .s23, .s31, .s32,
    .thr    (thr_q),
    .c      (cmp),
    .edge_o (edge_bit)
  );

  // ---------------------------------------------------------- border clear
  logic          bc_req, bc_done;
  logic [AW-1:0] bc_addr;

  border_clear #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_border_clear (
    .clk, .rst_n,
    .start   (start_ok),
    .grant   (busy && !wr_pend),
    .wr_req  (bc_req),
    .wr_addr (bc_addr),
    .done    (bc_done)
  );

  // ------------------------------------------------------ output image RAM
  logic          out_we;
  logic [AW-1:0] out_addr;
  logic          out_din;
  logic          out_dout;

  always_comb begin
    out_we   = 1'b0;
    out_addr = rd_addr;
    out_din  = 1'b0;
    if (wr_pend) begin
      out_we   = 1'b1;
      out_addr = wr_addr_q;
      out_din  = edge_bit;
    end else if (busy && bc_req) begin
      out_we   = 1'b1;
      out_addr = bc_addr;
    end
  end

  isys_mem #(.DEPTH(DEPTH), .WIDTH(1)) u_out_mem (
    .clk,
    .we   (out_we),
    .addr (out_addr),
    .din  (out_din),
    .dout (out_dout)
  );

  assign rd_data = out_dout;

  // ------------------------------------------------------ busy / done
  logic drained;
  assign drained = !ag_busy && !tag_d.valid && !r_full && !wr_pend && bc_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      thr_q <= '0;
    end else begin
      done <= 1'b0;
      if (start_ok) begin
        busy  <= 1'b1;
        thr_q <= threshold;
      end else if (busy && drained) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ assertions
  // The selection counter runs in step with the address generator's phase.
  a_sel_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    tag_d.valid |-> (sel == tag_d.phase));
  // A result write never collides with a host access: the RAMs are the
  // engine's while busy.
  a_write_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    wr_pend |-> busy);

endmodule
