// Serial-in serial-out systolic array for division in GF(2^m).
//
// Computes C(x) = A(x) / B(x) mod G(x) with the fixed-length variant of
// Euclid's algorithm: 2m-2 identical basic cells (gf2m_div_cell) in a
// one-way chain, one cell per iteration.  Operands enter one coefficient per
// clock, most significant first: a_in carries A (the initial U), b_in carries
// B (the initial R), g_in carries g_{m-1}..g_0 of the field polynomial (the
// initial S and the reduction polynomial), and ctl_in carries the framing
// sequence 0 1 1 ... 1 (0 in the MSB slot).  The first cell sees T = V = 0,
// state 0 and count 0; those lines are tied off here.
//
// Timing: words may follow each other without gaps, one every M clocks.  The
// MSB of C appears on c_out 4M-4 clocks after the MSB of the operands was
// applied, and ctl_out is 0 in that clock; the LSB follows M-1 clocks later,
// so an operation occupies 5M-4 clock cycles from first input bit to last
// output bit, as the published design states.  ctl_in must keep its sequence running
// (at least one more 0) after the last word.  B must be nonzero and G must
// be irreducible with degree M; otherwise c_out is meaningless.
//
// The chain structure, the cell count, the serial MSB-first format, the
// single control signal and the throughput/latency follow the published design; the
// naming and tie-off of unused first-cell lines are this design's own.  An
// assertion checks the framing rule: after each 0 on ctl_in come exactly M-1
// ones and then the next 0.
module gf2m_div_array
  import gf2m_pkg::*;
#(
  parameter int unsigned M = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ctl_in,
  input  logic a_in,
  input  logic b_in,
  input  logic g_in,
  output logic c_out,
  output logic ctl_out
);

  localparam int unsigned NCELL = 2 * M - 2;

  div_link_t link [NCELL+1];

  always_comb begin
    link[0]     = '0;
    link[0].ctl = ctl_in;
    link[0].r   = b_in;
    link[0].s   = g_in;
    link[0].u   = a_in;
    link[0].g   = g_in;
    link[0].cz  = 1'b1;       // count == 0, state == 0, T == V == 0
  end

  for (genvar i = 0; i < NCELL; i++) begin : g_cell
    gf2m_div_cell u_cell (
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
