// tb_gdi_cell: exhaustive check of the basic GDI cell.
// Applies every combination of G, P, N and their strength flags and compares
// the output with the pass-transistor rule written out here: G=1 passes N
// through an nMOS (a 1 comes out weak), G=0 passes P through a pMOS (a 0 comes
// out weak), and a weak input stays weak.
module tb_gdi_cell;
  import gdi_pkg::*;

  logic  g;
  gsig_t p, n, out;
  int    checks = 0, failures = 0;

  gdi_cell dut (.g(g), .p(p), .n(n), .out(out));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_v, exp_full;
    for (int i = 0; i < 32; i++) begin
      g = i[4]; p.v = i[3]; p.full = i[2]; n.v = i[1]; n.full = i[0];
      #1;
      if (g) begin
        exp_v    = n.v;
        exp_full = n.full && !n.v;
      end else begin
        exp_v    = p.v;
        exp_full = p.full && p.v;
      end
      checks++;
      if (out.v !== exp_v || out.full !== exp_full) begin
        failures++;
        $display("FAIL g=%b p=%b/%b n=%b/%b out=%b/%b exp=%b/%b",
                 g, p.v, p.full, n.v, n.full, out.v, out.full, exp_v, exp_full);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
