// edge_detect_tb: random hexagonal windows and thresholds. The reference
// names the six neighbours by position (TL, TR, L, R, BL, BR), lists the
// five polygons in those terms, and marks an edge only if every polygon's
// gray distance exceeds the threshold. Uniform, step and single-outlier
// windows are mixed in so that both results and every comparator occur.
module edge_detect_tb;
  localparam int PIX_W = 8;
  typedef enum int {TL, TR, L, R, BL, BR} pos_e;
  logic [PIX_W-1:0] s11, s12, s21, s23, s31, s32, thr;
  logic [4:0] c;
  logic edge_o;
  int checks = 0, failures = 0, n_edge = 0, n_flat = 0;

  edge_detect #(.PIX_W(PIX_W)) dut (.s11, .s12, .s21, .s23, .s31, .s32, .thr, .c, .edge_o);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int poly [5][$];
    poly[0] = '{TL, R, BL};
    poly[1] = '{TR, BR, L};
    poly[2] = '{TR, R, BL, L};
    poly[3] = '{TL, R, BR, L};
    poly[4] = '{TL, TR, BR, BL};
    for (int i = 0; i < 20000; i++) begin
      int v [6];
      logic [4:0] exp_c;
      int kind;
      kind = i % 4;
      foreach (v[k]) begin
        case (kind)
          0: v[k] = $urandom_range(255);
          1: v[k] = 120 + $urandom_range(3);                  // nearly flat
          2: v[k] = (k == TL || k == TR || k == L) ? 20 : 200; // step
          default: v[k] = 90;
        endcase
      end
      if (kind == 3) v[$urandom_range(5)] = 250;              // one outlier
      thr = PIX_W'($urandom_range(60));
      {s12, s11, s23, s21, s32, s31} = {PIX_W'(v[TL]), PIX_W'(v[TR]), PIX_W'(v[L]),
                                        PIX_W'(v[R]), PIX_W'(v[BL]), PIX_W'(v[BR])};
      for (int p = 0; p < 5; p++) begin
        int mx, mn;
        mx = -1; mn = 256;
        foreach (poly[p][q]) begin
          if (v[poly[p][q]] > mx) mx = v[poly[p][q]];
          if (v[poly[p][q]] < mn) mn = v[poly[p][q]];
        end
        exp_c[p] = (mx - mn) > int'(thr);
      end
      #1;
      checks++;
      if (c !== exp_c || edge_o !== (&exp_c)) begin
        failures++;
        $display("FAIL i=%0d c=%b exp %b edge=%b", i, c, exp_c, edge_o);
      end
      if (edge_o) n_edge++; else n_flat++;
    end
    checks++;
    if (n_edge == 0 || n_flat == 0) begin
      failures++;
      $display("FAIL coverage edge=%0d flat=%0d", n_edge, n_flat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
