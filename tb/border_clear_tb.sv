// border_clear_tb: grants the border-clear counter at random and checks that
// it writes exactly the pixels of row 0, row H-1 and column W-1, each once,
// then reports done; a second start repeats the list.
module border_clear_tb;
  localparam int W = 8, H = 6;
  localparam int AW = $clog2(W * H);
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, grant = 1'b0;
  logic wr_req, done;
  logic [AW-1:0] wr_addr;
  int checks = 0, failures = 0;

  border_clear #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst_n, .start, .grant, .wr_req, .wr_addr, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run();
    int hits [W * H];
    int n;
    foreach (hits[i]) hits[i] = 0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    n = 0;
    while (!done && n < 1000) begin
      grant = ($urandom_range(2) != 0);
      if (grant && wr_req) hits[wr_addr]++;
      @(negedge clk);
      n++;
    end
    grant = 1'b0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int exp;
        exp = (r == 0 || r == H - 1 || c == W - 1) ? 1 : 0;
        checks++;
        if (hits[r * W + c] != exp) begin
          failures++;
          $display("FAIL pixel (%0d,%0d) written %0d times, exp %0d", r, c, hits[r * W + c], exp);
        end
      end
    checks++;
    if (!done || wr_req) begin failures++; $display("FAIL not done"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (!done || wr_req) begin failures++; $display("FAIL active after reset"); end
    run();
    run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
