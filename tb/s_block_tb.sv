// s_block_tb: checks the hexagonal window registers.
// First replays the 8 x 8 example in which pixel values equal their
// addresses: zeros after reset, then columns (0,8,16) and (1,9,17) giving
//   after one load:  S11=0  S12=0 / S21=8 S22=0 S23=0 / S31=16 S32=0
//   after two loads: S11=1  S12=0 / S21=9 S22=8 S23=0 / S31=17 S32=16
// Then random loads (with and without `first`) are checked against a model.
module s_block_tb;
  localparam int PIX_W = 8;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, first = 1'b0;
  logic [PIX_W-1:0] r1 = '0, r2 = '0, r3 = '0;
  logic [PIX_W-1:0] s11, s12, s21, s22, s23, s31, s32;
  logic [PIX_W-1:0] e [7];   // expected S11,S12,S21,S22,S23,S31,S32
  int checks = 0, failures = 0;

  s_block #(.PIX_W(PIX_W)) dut (.clk, .rst_n, .load, .first, .r1, .r2, .r3,
                                .s11, .s12, .s21, .s22, .s23, .s31, .s32);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    checks++;
    if ({s11, s12, s21, s22, s23, s31, s32} !== {e[0], e[1], e[2], e[3], e[4], e[5], e[6]}) begin
      failures++;
      $display("FAIL %s: %0d %0d / %0d %0d %0d / %0d %0d  exp %0d %0d / %0d %0d %0d / %0d %0d", what,
               s11, s12, s21, s22, s23, s31, s32, e[0], e[1], e[2], e[3], e[4], e[5], e[6]);
    end
  endtask

  task automatic do_load(input logic [PIX_W-1:0] a, b, c, input logic f);
    r1 = a; r2 = b; r3 = c; first = f; load = 1'b1;
    @(negedge clk);
    load = 1'b0; first = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    e = '{default: '0};
    compare("after reset");
    // Idle clocks hold the window.
    r1 = 8'd55; r2 = 8'd66; r3 = 8'd77;
    repeat (3) @(negedge clk);
    compare("idle");
    do_load(8'd0, 8'd8, 8'd16, 1'b0);
    e = '{8'd0, 8'd0, 8'd8, 8'd0, 8'd0, 8'd16, 8'd0};
    compare("first column");
    do_load(8'd1, 8'd9, 8'd17, 1'b0);
    e = '{8'd1, 8'd0, 8'd9, 8'd8, 8'd0, 8'd17, 8'd16};
    compare("second column");
    for (int i = 0; i < 2000; i++) begin
      logic [PIX_W-1:0] a, b, c;
      logic f;
      a = PIX_W'($urandom); b = PIX_W'($urandom); c = PIX_W'($urandom);
      f = ($urandom_range(7) == 0);
      do_load(a, b, c, f);
      e[1] = f ? '0 : e[0];
      e[4] = f ? '0 : e[3];
      e[3] = f ? '0 : e[2];
      e[6] = f ? '0 : e[5];
      e[0] = a; e[2] = b; e[5] = c;
      compare("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
