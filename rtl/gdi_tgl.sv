// gdi_tgl: improved GDI block, two GDI cells joined into transmission gates.
//
// Cell A sees (G, P, N); cell B sees the complementary gate G' with its P and
// N inputs swapped, so B's pMOS sits in parallel with A's nMOS and B's nMOS in
// parallel with A's pMOS. Each branch is then a full transmission gate that
// passes both levels at full swing, removing the weak 0 / weak 1 of a bare GDI
// cell. Logic function is unchanged: OUT = G ? N : P.
//
// FULL = 1 builds the complete pair (2 pMOS + 2 nMOS). FULL = 0 builds the
// reduced form used where N is tied to 0: an nMOS always passes 0 strongly, so
// only one extra nMOS, gated by G', is placed across the pMOS branch
// (1 pMOS + 2 nMOS). G' must be the complement of G; the enclosing design
// derives it from the same signal. Combinational, zero delay.
//
// The pairing scheme and the reduced 3-transistor form follow the published design;
// modelling the reduced form's extra device as a lone pass nMOS is this
// design's reading of its transistor tally.
module gdi_tgl
  import gdi_pkg::*;
#(
  parameter bit FULL = 1'b1
) (
  input  logic  g,
  input  logic  g_n,  // complement of g
  input  gsig_t p,
  input  gsig_t n,
  output gsig_t out
);

  gsig_t a_out;

  gdi_cell u_a (.g(g), .p(p), .n(n), .out(a_out));

  if (FULL) begin : g_full
    gsig_t b_out;
    gdi_cell u_b (.g(g_n), .p(n), .n(p), .out(b_out));
    // Both cells drive the same node with the same value; it is strong when
    // either of the parallel devices passes its level strongly.
    assign out = '{v: a_out.v, full: a_out.full | b_out.full};
  end else begin : g_half
    // Lone nMOS across the pMOS branch: conducts while g_n = 1 and passes a
    // 0 on P strongly.
    logic extra_strong;
    assign extra_strong = g_n & ~p.v & p.full;
    assign out = '{v: a_out.v, full: a_out.full | extra_strong};
  end

endmodule
