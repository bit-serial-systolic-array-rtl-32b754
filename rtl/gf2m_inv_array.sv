// Serial-in serial-out systolic array for inversion in GF(2^m).
//
// Computes C(x) = 1 / B(x) mod G(x): 2m-2 simplified basic cells
// (gf2m_inv_cell) in a one-way chain.  Compared with the divider there is no
// dividend input and no G stream through the cells; G enters only as the
// initial S.  The constant dividend 1 is produced by the first cell
// (UNIT_U), see gf2m_inv_cell.
//
// Ports: b_in (B, MSB first), g_in (g_{m-1}..g_0), ctl_in (0 1 1 ... 1,
// 0 in the MSB slot), c_out (1/B, MSB first), ctl_out (0 in the MSB slot of
// c_out).  Timing is that of the divider: one result every M clocks, MSB of
// the result 4M-4 clocks after the MSB of B, 5M-4 cycles from first input to
// last output bit.  ctl_in must keep its sequence running after the last
// word.  B must be nonzero and G irreducible of degree M.
//
// The simplified cell, the chain of 2m-2 cells and the timing follow the
// published design; feeding the constant 1 from the framing line is this
// design's own choice.  An assertion checks the framing rule: after each 0
// on ctl_in come exactly M-1 ones and then the next 0.
module gf2m_inv_array
  import gf2m_pkg::*;
#(
  parameter int unsigned M = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ctl_in,
  input  logic b_in,
  input  logic g_in,
  output logic c_out,
  output logic ctl_out
);

  localparam int unsigned NCELL = 2 * M - 2;

  inv_link_t link [NCELL+1];

  always_comb begin
    link[0]     = '0;
    link[0].ctl = ctl_in;
    link[0].r   = b_in;
    link[0].s   = g_in;
    link[0].cz  = 1'b1;       // U comes from the first cell (UNIT_U)
  end

  for (genvar i = 0; i < NCELL; i++) begin : g_cell
    gf2m_inv_cell #(.UNIT_U(i == 0)) u_cell (
      .clk  (clk),
      .rst_n(rst_n),
      .li   (link[i]),
      .lo   (link[i+1])
    );
  end

  // Framing rule: 0 1 1 ... 1 repeating with period M once it has started.
  a_frame : assert property (@(posedge clk) disable iff (!rst_n)
                             !ctl_in |=> ctl_in [* M-1] ##1 !ctl_in)
    else $error("ctl_in framing broken: a word is not M slots long");

  assign c_out   = link[NCELL].u;
  assign ctl_out = link[NCELL].ctl;

endmodule
