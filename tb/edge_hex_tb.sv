// edge_hex_tb: end-to-end test of the edge engine at its default size
// (64 x 64 pixels of 8 bits). It loads test images through the host port,
// runs the engine on the hexagonal and on the rectangular lattice with
// several thresholds, reads the whole edge map back and compares every
// pixel with edge_ref_pkg. It also checks the run time
// (done rises 3*W*(H-2) + 4 clocks after the edge that takes start), that host writes and a second
// start are ignored while busy, and counts how often each mechanism
// happened: right-edge and left-edge row bands, padded reads at the left
// border, border-clear writes, edge and non-edge results, both lattices.
module edge_hex_tb;
  import hex_pkg::*;
  import edge_ref_pkg::*;
  localparam int W = 64, H = 64, PIX_W = 8;
  localparam int AW = $clog2(W * H);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  lattice_e lattice = LAT_HEX;
  logic [PIX_W-1:0] threshold = '0;
  logic busy, done;
  logic ld_we = 1'b0;
  logic [AW-1:0] ld_addr = '0, rd_addr = '0;
  logic [PIX_W-1:0] ld_data = '0;
  logic rd_data;

  int checks = 0, failures = 0;
  int n_hex = 0, n_rect = 0, n_left = 0, n_right = 0, n_pad = 0, n_border = 0;
  int n_edge1 = 0, n_edge0 = 0, n_ignored = 0;
  int img[];

  edge_hex dut (.clk, .rst_n, .start, .lattice, .threshold, .busy, .done,
                .ld_we, .ld_addr, .ld_data, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled inside the engine.
  always @(posedge clk) if (rst_n && busy) begin
    if (dut.ag_rd_en && dut.ag_phase == SEL_R2) begin
      if (dut.ag_right_edge) n_right++; else n_left++;
    end
    if (dut.ag_rd_en && dut.ag_pad) n_pad++;
    if (dut.bc_req && !dut.wr_pend) n_border++;
  end

  task automatic load_image();
    for (int a = 0; a < W * H; a++) begin
      @(negedge clk);
      ld_we = 1'b1; ld_addr = AW'(a); ld_data = PIX_W'(img[a]);
    end
    @(negedge clk);
    ld_we = 1'b0;
  endtask

  task automatic run_and_check(input lattice_e lat, input int thr);
    int cycles, errs, exp_cycles;
    @(negedge clk);
    lattice = lat; threshold = PIX_W'(thr); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;   // clocks after the edge that took start
    while (!done && cycles < 100000) begin
      // host traffic and a second start while busy must be ignored
      if (cycles == 100) begin
        ld_we = 1'b1; ld_addr = AW'(W + 5); ld_data = ~PIX_W'(img[W + 5]);
        start = 1'b1; lattice = (lat == LAT_HEX) ? LAT_RECT : LAT_HEX;
        threshold = PIX_W'(thr + 7);
        n_ignored++;
      end else begin
        ld_we = 1'b0; start = 1'b0;
      end
      @(negedge clk);
      cycles++;
    end
    ld_we = 1'b0; start = 1'b0;
    exp_cycles = 3 * W * (H - 2) + 4;
    checks++;
    if (cycles != exp_cycles) begin
      failures++;
      $display("FAIL run took %0d clocks, expected %0d", cycles, exp_cycles);
    end
    if (lat == LAT_HEX) n_hex++; else n_rect++;
    // read back the edge map (one clock read latency)
    errs = 0;
    for (int a = 0; a < W * H; a++) begin
      bit e;
      rd_addr = AW'(a);
      @(negedge clk);
      e = edge_ref(img, W, H, lat == LAT_RECT, thr, a / W, a % W);
      checks++;
      if (rd_data !== e) begin
        failures++;
        if (errs++ < 10) $display("FAIL %s thr=%0d pixel (%0d,%0d) got %b exp %b",
                                  lat.name(), thr, a / W, a % W, rd_data, e);
      end
      if (e) n_edge1++; else n_edge0++;
    end
    $display("%s T=%0d: %0d clocks, %0d mismatches", lat.name(), thr, cycles, errs);
  endtask

  initial begin
    make_image(img, W, H, 1, 255);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_image();
    run_and_check(LAT_HEX, 20);
    run_and_check(LAT_RECT, 20);
    run_and_check(LAT_HEX, 0);
    // a fresh image with random pixels only
    foreach (img[i]) img[i] = $urandom_range(255);
    load_image();
    run_and_check(LAT_HEX, 60);
    run_and_check(LAT_RECT, 100);
    $display("mechanisms: hex runs %0d, rect runs %0d, right-edge reads %0d, left-edge reads %0d,",
             n_hex, n_rect, n_right, n_left);
    $display("  padded reads %0d, border writes %0d, edge pixels %0d, flat pixels %0d, ignored host accesses %0d",
             n_pad, n_border, n_edge1, n_edge0, n_ignored);
    checks++;
    if (n_hex == 0 || n_rect == 0 || n_right == 0 || n_left == 0 || n_pad == 0 ||
        n_border == 0 || n_edge1 == 0 || n_edge0 == 0 || n_ignored == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
