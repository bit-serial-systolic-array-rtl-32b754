// GF(2^m) division and inversion unit: the bit-serial systolic divider and
// the bit-serial systolic inverter side by side.
//
// Both arrays run Euclid's algorithm in its fixed-length form (2m-2
// iterations, one basic cell per iteration) on operands that stream in one
// coefficient per clock, MSB first, framed by a single control line that is 0
// in the first slot of every word.  The default M = 8 is the size of the
// prototype divider chip described for GF(2^8).
//
//   div_*: C = A / B mod G.  Inputs div_ctl, div_a, div_b, div_g; outputs
//          div_c and div_ctl_o (0 in the MSB slot of div_c).
//   inv_*: C = 1 / B mod G.  Inputs inv_ctl, inv_b, inv_g; outputs inv_c
//          and inv_ctl_o.
//
// Each array accepts a new operation every M clocks and delivers the MSB of
// its result 4M-4 clocks after the MSB of its operands (5M-4 cycles from the
// first input bit to the last output bit).  The two arrays share only the
// clock and the asynchronous active-low reset.  The two arrays and their
// serial interfaces follow the published design; placing both in one top,
// and the reset, are this design's own arrangement.
module gf2m_euclid_top #(
  parameter int unsigned M = 8
) (
  input  logic clk,
  input  logic rst_n,
  // divider
  input  logic div_ctl,
  input  logic div_a,
  input  logic div_b,
  input  logic div_g,
  output logic div_c,
  output logic div_ctl_o,
  // inverter
  input  logic inv_ctl,
  input  logic inv_b,
  input  logic inv_g,
  output logic inv_c,
  output logic inv_ctl_o
);

  gf2m_div_array #(.M(M)) u_div (
    .clk    (clk),
    .rst_n  (rst_n),
    .ctl_in (div_ctl),
    .a_in   (div_a),
    .b_in   (div_b),
    .g_in   (div_g),
    .c_out  (div_c),
    .ctl_out(div_ctl_o)
  );

  gf2m_inv_array #(.M(M)) u_inv (
    .clk    (clk),
    .rst_n  (rst_n),
    .ctl_in (inv_ctl),
    .b_in   (inv_b),
    .g_in   (inv_g),
    .c_out  (inv_c),
    .ctl_out(inv_ctl_o)
  );

endmodule
