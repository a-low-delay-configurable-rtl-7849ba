// gdi_config_reg: configurable FPGA register built from GDI cells.
//
// One register bit that can be set up as a transparent latch, a falling-edge
// register, a register whose output is overwritten synchronously, or one whose
// output is overwritten asynchronously. Three static control inputs choose the
// mode (Y, Z, R); there is no separate control decoder:
//
//   Y Z R | mode
//   1 - - | latch: Q follows D while CLK is high, holds while CLK is low
//   0 - 0 | register: Q takes D at the falling edge of CLK
//   0 0 1 | synchronous overwrite: register, and Q is forced to 0 while X and
//         |   CLK are both high
//   0 1 1 | asynchronous overwrite: register, and Q is forced to 0 while X is
//         |   high, regardless of CLK
//
// Structure (every element below is a GDI cell, OUT = G ? N : P):
//   sel    G=Y   P=CLK  N=CLK'    slave clock s = Y ? CLK' : CLK
//   master G=CLK N=D    P=m       m follows D while CLK high
//   slave  G=s   P=m    N=q       q follows m while s low
//   xc     G=CLK' P=X   N=0       a = CLK ? X : 0      (X gated by the clock)
//   zc     G=Z   P=a    N=X       b = Z ? X : a        (sync or async X)
//   yc     G=Y   P=b    N=0       x = Y ? 0 : b        (no overwrite in latch mode)
//   rc     G=x   P=0    N=R       r = x ? R : 0        (overwrite enable)
//   out    G=r   P=q    N=0       Q = r ? 0 : q
// In latch mode s = CLK', so master and slave are both transparent while CLK
// is high and both hold while it is low. In the register modes s = CLK, so the
// slave is transparent while CLK is low and the pair is a falling-edge
// master-slave flip-flop. The overwrite acts on the output cell only: the
// stored bit keeps following D, and Q shows it again as soon as X drops.
//
// IMPROVED = 1 (default) is the improved circuit: the five cells sel, master,
// slave, zc and rc are full transmission-gate pairs, the three cells whose N
// is tied to 0 (xc, yc, out) get one extra nMOS, and three inverters make the
// complementary gates s', x' and r'. 16 pMOS + 19 nMOS. Every node then
// carries full-swing levels (q_strong stays 1). IMPROVED = 0 is the same
// circuit of eight bare GDI cells (8 pMOS + 8 nMOS), whose output can be a
// weak 0 or weak 1 (q_strong = 0).
//
// Interface: all inputs are plain levels; CLK', Y' and Z' are taken as the
// complements of the CLK, Y and Z inputs (the transistor count has no
// inverters for them, so they come from outside the cell). Outputs Q and its
// strength flag. Zero-delay model: no timing other than the clock phases.
//
// The cell netlist, the mode table and the transistor tally follow the published
// design. The strength flag, the polarity of X (active high, forcing 0) read
// from the cell connections, and the zero-delay timing are this model's own.
// The latch warnings from the master and slave stages are intended.
module gdi_config_reg
  import gdi_pkg::*;
#(
  parameter bit IMPROVED = 1'b1
) (
  input  logic clk,
  input  logic d,         // data input
  input  logic x,         // overwrite input
  input  logic y,         // 1: latch mode, 0: register modes
  input  logic z,         // 1: asynchronous overwrite, 0: synchronous
  input  logic r,         // 1: overwrite enabled (register modes)
  output logic q,
  output logic q_strong   // 1 when Q is a full-swing level
);

  localparam cell_kind_e FULL_KIND = IMPROVED ? CELL_TGL : CELL_GDI;

  // Primary inputs are full-swing levels.
  gsig_t clk_s, clk_ns, d_s, x_s, r_s, zero_s;
  assign clk_s  = rail(clk);
  assign clk_ns = rail(~clk);
  assign d_s    = rail(d);
  assign x_s    = rail(x);
  assign r_s    = rail(r);
  assign zero_s = rail(1'b0);

  gsig_t s_node, m_node, q_node, a_node, b_node, x_node, r_node, q_out;
  logic  s_inv, x_inv, r_inv;   // inverter outputs; they drive gates only

  // Slave clock select.
  if (IMPROVED) begin : g_sel_tgl
    gdi_tgl #(.FULL(1'b1)) u_sel (.g(y), .g_n(~y), .p(clk_s), .n(clk_ns), .out(s_node));
  end else begin : g_sel_gdi
    gdi_cell u_sel (.g(y), .p(clk_s), .n(clk_ns), .out(s_node));
  end

  assign s_inv = ~s_node.v;

  // Master and slave storage stages.
  gdi_store #(.KIND(FULL_KIND), .FB_ON_N(1'b0)) u_master (
    .g(clk), .g_n(~clk), .d(d_s), .o(m_node)
  );

  gdi_store #(.KIND(FULL_KIND), .FB_ON_N(1'b1)) u_slave (
    .g(s_node.v), .g_n(s_inv), .d(m_node), .o(q_node)
  );

  // Overwrite path.
  if (IMPROVED) begin : g_ovw_tgl
    gdi_tgl #(.FULL(1'b0)) u_xc (.g(~clk), .g_n(clk), .p(x_s), .n(zero_s), .out(a_node));
    gdi_tgl #(.FULL(1'b1)) u_zc (.g(z), .g_n(~z), .p(a_node), .n(x_s), .out(b_node));
    gdi_tgl #(.FULL(1'b0)) u_yc (.g(y), .g_n(~y), .p(b_node), .n(zero_s), .out(x_node));
    assign x_inv = ~x_node.v;
    gdi_tgl #(.FULL(1'b1)) u_rc (.g(x_node.v), .g_n(x_inv), .p(zero_s), .n(r_s), .out(r_node));
    assign r_inv = ~r_node.v;
    gdi_tgl #(.FULL(1'b0)) u_out (.g(r_node.v), .g_n(r_inv), .p(q_node), .n(zero_s), .out(q_out));
  end else begin : g_ovw_gdi
    gdi_cell u_xc  (.g(~clk),     .p(x_s),    .n(zero_s), .out(a_node));
    gdi_cell u_zc  (.g(z),        .p(a_node), .n(x_s),    .out(b_node));
    gdi_cell u_yc  (.g(y),        .p(b_node), .n(zero_s), .out(x_node));
    gdi_cell u_rc  (.g(x_node.v), .p(zero_s), .n(r_s),    .out(r_node));
    gdi_cell u_out (.g(r_node.v), .p(q_node), .n(zero_s), .out(q_out));
    // The plain build has no inverters.
    assign x_inv = 1'b0;
    assign r_inv = 1'b0;
  end

  assign q        = q_out.v;
  assign q_strong = q_out.full;

endmodule
