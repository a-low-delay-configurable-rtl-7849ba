// gdi_pkg: shared types and helpers for the gate-diffusion-input (GDI) register.
//
// A GDI cell is one pMOS and one nMOS sharing the gate input G. The pMOS
// passes the P input to the output when G is low, the nMOS passes the N input
// when G is high, so logically OUT = G ? N : P, a 2:1 multiplexer.
//
// A single pass transistor does not pass both levels cleanly: an nMOS passes a
// strong 0 but a degraded ("weak") 1, a pMOS passes a strong 1 but a weak 0.
// That degradation is the central problem the design addresses, so every node
// of the register is modelled as a value together with a strength flag
// (gsig_t). A node stays strong only if every pass device it went through
// passed its level strongly; an inverter restores full strength.
//
// Three cell builds are used:
//   CELL_GDI  - bare GDI cell, one pMOS and one nMOS (2 transistors).
//   CELL_TGL  - two GDI cells with complementary gates whose P and N inputs are
//               cross-connected, i.e. a full transmission gate on each branch
//               (4 transistors). Both levels pass strongly on both branches.
//   CELL_HALF - a GDI cell whose N input is tied to 0 (an nMOS always passes
//               0 strongly), so only the P branch gets a parallel nMOS driven by
//               the complementary gate (3 transistors).
// The transistor counts follow the published tally of the improved
// circuit; the strength rule is the textbook pass-transistor rule the published design
// states (weak 0 when P and G are both 0, weak 1 when N and G are both 1).
package gdi_pkg;

  typedef struct packed {
    logic v;       // logic value of the node
    logic full;    // 1: full-swing level, 0: degraded by a single pass device
  } gsig_t;

  typedef enum logic [1:0] {
    CELL_GDI  = 2'd0,
    CELL_TGL  = 2'd1,
    CELL_HALF = 2'd2
  } cell_kind_e;

  // Strength of a level passed by the N branch (selected when G = 1).
  function automatic logic n_branch_strong(cell_kind_e kind, logic level);
    return (kind == CELL_TGL) ? 1'b1 : (level == 1'b0);
  endfunction

  // Strength of a level passed by the P branch (selected when G = 0).
  function automatic logic p_branch_strong(cell_kind_e kind, logic level);
    return (kind == CELL_GDI) ? (level == 1'b1) : 1'b1;
  endfunction

  // pMOS / nMOS transistors in one cell of the given build.
  function automatic int unsigned cell_pmos(cell_kind_e kind);
    return (kind == CELL_TGL) ? 2 : 1;
  endfunction

  function automatic int unsigned cell_nmos(cell_kind_e kind);
    return (kind == CELL_GDI) ? 1 : 2;
  endfunction

  // Transistor tally of the whole register: five cells with both branches
  // used (full pairs when improved), three cells with N tied to 0 (reduced
  // pairs when improved) and, in the improved build, three restoring
  // inverters for the complementary gates.
  function automatic int unsigned reg_pmos(bit improved);
    return improved ? 5 * cell_pmos(CELL_TGL) + 3 * cell_pmos(CELL_HALF) + 3
                    : 8 * cell_pmos(CELL_GDI);
  endfunction

  function automatic int unsigned reg_nmos(bit improved);
    return improved ? 5 * cell_nmos(CELL_TGL) + 3 * cell_nmos(CELL_HALF) + 3
                    : 8 * cell_nmos(CELL_GDI);
  endfunction

  // A constant tied to a supply rail is a strong level.
  function automatic gsig_t rail(logic level);
    return '{v: level, full: 1'b1};
  endfunction

endpackage
