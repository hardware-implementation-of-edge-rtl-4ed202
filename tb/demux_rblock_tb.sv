// demux_rblock_tb: drives random select codes, enables and pixels into the
// 1:3 demultiplexer and checks R1..R3 and the `full` flag against a model.
module demux_rblock_tb;
  import hex_pkg::*;
  localparam int PIX_W = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  sel_e sel = SEL_R1;
  logic [PIX_W-1:0] din = '0, r1, r2, r3;
  logic full;
  logic [PIX_W-1:0] m [3];
  logic m_full;
  int checks = 0, failures = 0;

  demux_rblock #(.PIX_W(PIX_W)) dut (.clk, .rst_n, .en, .sel, .din, .r1, .r2, .r3, .full);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = '{default: '0};
    m_full = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int k;
      en  = ($urandom_range(3) != 0);
      k   = $urandom_range(2);
      sel = sel_e'(k);
      din = PIX_W'($urandom);
      @(negedge clk);
      m_full = en && (k == 2);
      if (en) m[k] = din;
      checks++;
      if (r1 !== m[0] || r2 !== m[1] || r3 !== m[2] || full !== m_full) begin
        failures++;
        $display("FAIL step %0d R=%0d,%0d,%0d exp %0d,%0d,%0d full=%b/%b",
                 i, r1, r2, r3, m[0], m[1], m[2], full, m_full);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
