// gdi_store: a GDI cell or transmission-gate pair with its output fed back to
// one of its own inputs, forming a level-sensitive storage node.
//
// FB_ON_N = 0: data on N, output fed back to P. The node follows D while G is
// high and holds while G is low (the master stage of the register).
// FB_ON_N = 1: data on P, output fed back to N. The node follows D while G is
// low and holds while G is high (the slave stage).
//
// KIND selects a bare GDI cell (CELL_GDI) or a full transmission-gate pair
// (CELL_TGL); G' is used only by the pair and must be the complement of G.
// The output carries the strength flag of gdi_pkg: while transparent it is the
// data strength through the selected branch, while holding it is the stored
// level through the feedback branch.
//
// The feedback loop is written as a latch (always_latch) rather than as a
// combinational loop through a cell instance, so every tool sees a storage
// element; the latch warnings this produces are intended, the circuit is
// latch-based by design. Storage elements have no reset: the published design gives
// the register none, it is written through D or overridden at Q through X.
module gdi_store
  import gdi_pkg::*;
#(
  parameter cell_kind_e KIND    = CELL_TGL,
  parameter bit         FB_ON_N = 1'b0
) (
  input  logic  g,
  input  logic  g_n,  // complement of g, used by the CELL_TGL build
  input  gsig_t d,
  output gsig_t o
);

  logic  transparent;
  gsig_t d_pass;   // data level as it appears after the selected branch
  gsig_t held;     // level stored on the node
  logic  both_on;

  assign transparent = FB_ON_N ? ~g : g;

  // A bare cell passes each level through one device type only. In the pair
  // the complementary cell's device conducts in parallel (when G' really is
  // the complement of G) and restores full strength.
  assign both_on = (KIND == CELL_TGL) && (g_n == ~g);

  always_comb begin
    d_pass.v = d.v;
    if (FB_ON_N)
      d_pass.full = d.full & (p_branch_strong(CELL_GDI, d.v) | both_on);
    else
      d_pass.full = d.full & (n_branch_strong(CELL_GDI, d.v) | both_on);
  end

  always_latch begin
    if (transparent) held = d_pass;
  end

  always_comb begin
    if (transparent) begin
      o = d_pass;
    end else begin
      o.v = held.v;
      if (FB_ON_N)
        o.full = held.full & (n_branch_strong(CELL_GDI, held.v) | both_on);
      else
        o.full = held.full & (p_branch_strong(CELL_GDI, held.v) | both_on);
    end
  end

endmodule
