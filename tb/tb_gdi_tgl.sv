// tb_gdi_tgl: exhaustive check of the improved GDI block in both builds.
// Full pair: output = G ? N : P, strong whenever the selected input is strong.
// Reduced form (N tied to 0 in use): the N branch is still a lone nMOS (a 1
// comes out weak), the P branch passes both levels strongly.
module tb_gdi_tgl;
  import gdi_pkg::*;

  logic  g;
  gsig_t p, n, out_full, out_half;
  int    checks = 0, failures = 0;

  gdi_tgl #(.FULL(1'b1)) dut_full (.g(g), .g_n(~g), .p(p), .n(n), .out(out_full));
  gdi_tgl #(.FULL(1'b0)) dut_half (.g(g), .g_n(~g), .p(p), .n(n), .out(out_half));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_v, exp_full_s, exp_half_s;
    for (int i = 0; i < 32; i++) begin
      g = i[4]; p.v = i[3]; p.full = i[2]; n.v = i[1]; n.full = i[0];
      #1;
      exp_v      = g ? n.v : p.v;
      exp_full_s = g ? n.full : p.full;
      exp_half_s = g ? (n.full && !n.v) : p.full;
      checks += 2;
      if (out_full.v !== exp_v || out_full.full !== exp_full_s) begin
        failures++;
        $display("FAIL full g=%b p=%b/%b n=%b/%b out=%b/%b", g, p.v, p.full, n.v, n.full,
                 out_full.v, out_full.full);
      end
      if (out_half.v !== exp_v || out_half.full !== exp_half_s) begin
        failures++;
        $display("FAIL half g=%b p=%b/%b n=%b/%b out=%b/%b", g, p.v, p.full, n.v, n.full,
                 out_half.v, out_half.full);
      end
    end
    // A bare cell would give a weak 0 on P and a weak 1 on N; the pair must not.
    g = 1'b0; p = rail(1'b0); n = rail(1'b1); #1;
    checks++;
    if (!out_full.full || !out_half.full) begin
      failures++;
      $display("FAIL strong 0 through P branch");
    end
    g = 1'b1; #1;
    checks++;
    if (!out_full.full || out_full.v !== 1'b1) begin
      failures++;
      $display("FAIL strong 1 through N branch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
