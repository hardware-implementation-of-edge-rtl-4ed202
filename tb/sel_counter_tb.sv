// sel_counter_tb: checks the selection counter cycles 00, 01, 10 on enabled
// clocks only, that `last` marks the 10 state and that `clr` restarts it.
module sel_counter_tb;
  import hex_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  sel_e sel;
  logic last;
  int   model;
  int checks = 0, failures = 0;

  sel_counter dut (.clk, .rst_n, .clr, .en, .sel, .last);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (int'(sel) != model || last != (model == 2)) begin
        failures++;
        $display("FAIL cycle %0d sel=%b exp=%0d last=%b", i, sel, model, last);
      end
      clr = ($urandom_range(30) == 0);
      en  = ($urandom_range(3) != 0);
      if (clr)     model = 0;
      else if (en) model = (model + 1) % 3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
