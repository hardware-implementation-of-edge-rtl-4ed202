// isys_mem_tb: self-checking test of the single-port block RAM.
// Writes random words, reads them back (one clock of read latency), checks
// that a write cycle returns the old word, and that unwritten neighbours of
// written words are not disturbed. A reference array models the RAM.
module isys_mem_tb;
  localparam int DEPTH = 4096;
  localparam int WIDTH = 8;
  localparam int AW    = $clog2(DEPTH);

  logic             clk = 1'b0;
  logic             we;
  logic [AW-1:0]    addr;
  logic [WIDTH-1:0] din, dout;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  isys_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .we, .addr, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [WIDTH-1:0] exp, input string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s addr=%0d got %0h exp %0h", what, addr, dout, exp);
    end
  endtask

  initial begin
    we = 0; addr = 0; din = 0;
    // fill the whole RAM
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; addr = AW'(a); din = WIDTH'($urandom);
      ref_mem[a] = din;
    end
    @(negedge clk); we = 0;
    // read everything back
    for (int a = 0; a < DEPTH; a++) begin
      addr = AW'(a);
      @(negedge clk);
      check(ref_mem[a], "readback");
    end
    // random mix of reads and writes; a write returns the old word
    for (int i = 0; i < 5000; i++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      addr = AW'(a);
      we   = ($urandom_range(1) == 1);
      din  = WIDTH'($urandom);
      @(negedge clk);
      check(ref_mem[a], we ? "read-during-write" : "read");
      if (we) ref_mem[a] = din;
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
