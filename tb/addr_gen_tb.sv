// addr_gen_tb: runs the address generator on a small 8 x 6 image in both
// lattice modes and compares every issued read (address, pad flag, phase,
// first-step flag, result address) with a loop-nest reference written from
// the hexagonal geometry: odd rows sit half a pixel to the right, so for an
// even centre row the upper/lower neighbours are columns x-1 and x, for an
// odd centre row (and always on the rectangular lattice) x and x+1.
// Also checks the scan length, 3*W*(H-2) clocks, and that `start` while
// busy is ignored.
module addr_gen_tb;
  import hex_pkg::*;
  localparam int W = 8, H = 6;
  localparam int AW = $clog2(W * H);
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  lattice_e lattice = LAT_HEX;
  logic busy, rd_en, rd_pad, rd_first, res_valid, right_edge;
  logic [AW-1:0] rd_addr, res_addr;
  sel_e rd_phase;
  int checks = 0, failures = 0, n_left = 0, n_right = 0, n_pad = 0;

  addr_gen #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst_n, .start, .lattice, .busy, .rd_en,
    .rd_addr, .rd_pad, .rd_phase, .rd_first, .res_valid, .res_addr, .right_edge);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input lattice_e lat);
    int cycles;
    @(negedge clk);
    lattice = lat; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    for (int r = 1; r <= H - 2; r++) begin
      for (int s = 0; s < W; s++) begin
        for (int p = 0; p < 3; p++) begin
          int row, col, x;
          bit pad, lag;
          // centre pixel after this step is (r, s-1); find column of outer rows
          x   = s - 1;
          lag = (lat == LAT_HEX) && (r % 2 == 0);
          row = r - 1 + p;
          col = (p != 1 && lag) ? s - 1 : s;
          pad = (col < 0);
          if (p == 1) begin
            if (lag) n_left++; else n_right++;
          end
          if (pad) n_pad++;
          checks++;
          if (!rd_en || !busy || rd_pad != pad || int'(rd_phase) != p || rd_first != (s == 0) ||
              res_valid != (s > 0) || (!pad && int'(rd_addr) != row * W + col) ||
              (s > 0 && int'(res_addr) != r * W + x) || right_edge == lag) begin
            failures++;
            $display("FAIL r=%0d s=%0d p=%0d addr=%0d exp %0d pad=%b phase=%0d first=%b res=%b/%0d",
                     r, s, p, rd_addr, row * W + col, rd_pad, rd_phase, rd_first, res_valid, res_addr);
          end
          // a second start while busy must change nothing
          start = (r == 2 && s == 3 && p == 0);
          @(negedge clk);
          start = 1'b0;
          cycles++;
        end
      end
    end
    checks++;
    if (busy || rd_en || cycles != 3 * W * (H - 2)) begin
      failures++;
      $display("FAIL scan did not end after %0d clocks", cycles);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (busy || rd_en) begin failures++; $display("FAIL busy after reset"); end
    run(LAT_HEX);
    repeat (3) @(negedge clk);
    run(LAT_RECT);
    run(LAT_HEX);
    checks++;
    if (n_left == 0 || n_right == 0 || n_pad == 0) begin
      failures++;
      $display("FAIL coverage left=%0d right=%0d pad=%0d", n_left, n_right, n_pad);
    end
    $display("left-edge reads %0d, right-edge reads %0d, padded reads %0d", n_left, n_right, n_pad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
