// clap_comparator_tb: random and corner-case polygons for a 3-input and a
// 4-input comparator; max, min, gray distance and the D > T flag are
// checked against values computed in the testbench.
module clap_comparator_tb;
  localparam int PIX_W = 8;
  logic [PIX_W-1:0] a [3];
  logic [PIX_W-1:0] b [4];
  logic [PIX_W-1:0] thr;
  logic [PIX_W-1:0] amax, amin, ad, bmax, bmin, bd;
  logic ae, be;
  int checks = 0, failures = 0;

  clap_comparator #(.N(3), .PIX_W(PIX_W)) dut3 (.px(a), .thr, .gmax(amax), .gmin(amin), .gdist(ad), .edge_o(ae));
  clap_comparator #(.N(4), .PIX_W(PIX_W)) dut4 (.px(b), .thr, .gmax(bmax), .gmin(bmin), .gdist(bd), .edge_o(be));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int vals[], input int t, input logic [PIX_W-1:0] gmx, gmn, gd,
                           input logic e, input string name);
    int mx, mn;
    mx = 0; mn = 255;
    foreach (vals[i]) begin
      if (vals[i] > mx) mx = vals[i];
      if (vals[i] < mn) mn = vals[i];
    end
    checks++;
    if (int'(gmx) != mx || int'(gmn) != mn || int'(gd) != mx - mn || e != ((mx - mn) > t)) begin
      failures++;
      $display("FAIL %s max %0d/%0d min %0d/%0d d %0d/%0d e %b thr %0d", name, gmx, mx, gmn, mn, gd, mx - mn, e, t);
    end
  endtask

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int va[], vb[];
      int t;
      va = new[3]; vb = new[4];
      t = (i < 100) ? 0 : (i < 200 ? 255 : $urandom_range(255));
      for (int k = 0; k < 3; k++) begin va[k] = (i % 7 == 0) ? 100 : $urandom_range(255); a[k] = PIX_W'(va[k]); end
      for (int k = 0; k < 4; k++) begin vb[k] = (i % 5 == 0) ? 50 + k : $urandom_range(255); b[k] = PIX_W'(vb[k]); end
      // threshold exactly at the distance: D <= T must give 0
      if (i % 11 == 0) begin
        int mx, mn;
        mx = 0; mn = 255;
        foreach (va[k]) begin
          if (va[k] > mx) mx = va[k];
          if (va[k] < mn) mn = va[k];
        end
        t = mx - mn;
      end
      thr = PIX_W'(t);
      #1;
      check_one(va, t, amax, amin, ad, ae, "N=3");
      check_one(vb, t, bmax, bmin, bd, be, "N=4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
