// edge_hex_fig_tb: the 8 x 8 walk-through of the architecture. Pixel values
// equal their addresses (0 .. 63). After reset the window holds zeros; once
// the first column (pixels 0, 8, 16) has passed through R1..R3 the window is
//   S11=0 S12=0 / S21=8 S22=0 S23=0 / S31=16 S32=0
// and after the second column (1, 9, 17)
//   S11=1 S12=0 / S21=9 S22=8 S23=0 / S31=17 S32=16.
// The testbench checks these two window states, that a new window column is
// formed every three clocks, and then the full edge map of the 8 x 8 image
// (plus a random one) on both lattices against edge_ref_pkg.
module edge_hex_fig_tb;
  import hex_pkg::*;
  import edge_ref_pkg::*;
  localparam int W = 8, H = 8, PIX_W = 8;
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
  int img[];
  int loads[$];   // clock numbers of S_block loads

  edge_hex #(.IMG_W(W), .IMG_H(H), .PIX_W(PIX_W)) dut (.clk, .rst_n, .start, .lattice, .threshold,
    .busy, .done, .ld_we, .ld_addr, .ld_data, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit win_is(input int e11, e12, e21, e22, e23, e31, e32);
    return dut.s11 == PIX_W'(e11) && dut.s12 == PIX_W'(e12) && dut.s21 == PIX_W'(e21) &&
           dut.s22 == PIX_W'(e22) && dut.s23 == PIX_W'(e23) && dut.s31 == PIX_W'(e31) &&
           dut.s32 == PIX_W'(e32);
  endfunction

  task automatic show(input string what);
    $display("%s: S11=%0d S12=%0d / S21=%0d S22=%0d S23=%0d / S31=%0d S32=%0d", what,
             dut.s11, dut.s12, dut.s21, dut.s22, dut.s23, dut.s31, dut.s32);
  endtask

  task automatic load_image();
    for (int a = 0; a < W * H; a++) begin
      @(negedge clk);
      ld_we = 1'b1; ld_addr = AW'(a); ld_data = PIX_W'(img[a]);
    end
    @(negedge clk);
    ld_we = 1'b0;
  endtask

  task automatic run_and_check(input lattice_e lat, input int thr, input bit watch);
    int clk_n, errs;
    @(negedge clk);
    lattice = lat; threshold = PIX_W'(thr); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    clk_n = 0;
    loads.delete();
    while (!done && clk_n < 2000) begin
      if (dut.r_full) loads.push_back(clk_n);
      @(negedge clk);
      clk_n++;
      if (watch && loads.size() == 1 && dut.r_full == 1'b0 && clk_n == loads[0] + 1) begin
        show("after first column");
        checks++;
        if (!win_is(0, 0, 8, 0, 0, 16, 0)) begin failures++; $display("FAIL first window"); end
      end
      if (watch && loads.size() == 2 && clk_n == loads[1] + 1) begin
        show("after second column");
        checks++;
        if (!win_is(1, 0, 9, 8, 0, 17, 16)) begin failures++; $display("FAIL second window"); end
      end
    end
    // one window column every three clocks
    checks++;
    if (loads.size() != W * (H - 2)) begin
      failures++;
      $display("FAIL %0d window loads, expected %0d", loads.size(), W * (H - 2));
    end
    for (int i = 1; i < loads.size(); i++) begin
      checks++;
      if (loads[i] - loads[i - 1] != 3) begin
        failures++;
        $display("FAIL loads %0d and %0d are %0d clocks apart", i - 1, i, loads[i] - loads[i - 1]);
      end
    end
    errs = 0;
    for (int a = 0; a < W * H; a++) begin
      bit e;
      rd_addr = AW'(a);
      @(negedge clk);
      e = edge_ref(img, W, H, lat == LAT_RECT, thr, a / W, a % W);
      checks++;
      if (rd_data !== e) begin
        failures++;
        if (errs++ < 10) $display("FAIL pixel (%0d,%0d) got %b exp %b", a / W, a % W, rd_data, e);
      end
    end
  endtask

  initial begin
    img = new[W * H];
    foreach (img[i]) img[i] = i;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (!win_is(0, 0, 0, 0, 0, 0, 0)) begin failures++; $display("FAIL window not zero after reset"); end
    load_image();
    run_and_check(LAT_HEX, 4, 1'b1);
    run_and_check(LAT_RECT, 4, 1'b0);
    foreach (img[i]) img[i] = $urandom_range(255);
    load_image();
    run_and_check(LAT_HEX, 50, 1'b0);
    run_and_check(LAT_RECT, 50, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
