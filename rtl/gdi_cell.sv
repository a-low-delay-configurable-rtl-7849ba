// gdi_cell: the basic gate-diffusion-input cell.
//
// One pMOS and one nMOS share the gate input G. The pMOS connects input P to
// the output while G is low and the nMOS connects input N while G is high, so
// the cell is a 2:1 multiplexer with G as the select: OUT = G ? N : P.
// Unlike a CMOS inverter, the transistor sources are the inputs P and N rather
// than the supply rails, which is what lets one cell do the work of a mux.
//
// The output carries a strength flag besides its value: a level passed by the
// nMOS is weak when it is a 1, one passed by the pMOS is weak when it is a 0,
// and a level that arrives weak stays weak. The gate input is taken as a
// logic level only (a degraded gate level is assumed still to switch the
// devices). Purely combinational, zero delay.
//
// The cell and its mux function follow the published design; the strength flag is
// this model's way of exposing the degraded levels the published design describes.
module gdi_cell
  import gdi_pkg::*;
(
  input  logic  g,    // common gate of the pMOS and the nMOS
  input  gsig_t p,    // pMOS source, passed when g = 0
  input  gsig_t n,    // nMOS source, passed when g = 1
  output gsig_t out
);

  always_comb begin
    if (g) begin
      out.v      = n.v;
      out.full = n.full & n_branch_strong(CELL_GDI, n.v);
    end else begin
      out.v      = p.v;
      out.full = p.full & p_branch_strong(CELL_GDI, p.v);
    end
  end

endmodule
