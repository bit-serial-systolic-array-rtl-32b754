// Basic cell of the bit-serial systolic inverter for GF(2^m).
//
// Same iteration as the divider cell (gf2m_div_cell) with U starting at 1:
// for inversion the step T = x*T mod G may be replaced by T = x*T (the
// coefficient shifted out above x^{m-1} is dropped), so the cell has no G
// stream, no t_{m-1} latch and no reduction gate.  Everything else -- the
// latched Ctrl2/Ctrl3/state broadcast, the one-hot count flag, the three
// masking AND gates and the two-clock latency per line -- is as described in
// gf2m_div_cell.
//
// UNIT_U: set in the first cell of an array only.  The U operand of an
// inversion is the constant 1, whose single nonzero coefficient sits in the
// last slot of the word.  That slot is exactly the one in which the live
// ctl input already shows the next word's 0, so the first cell takes
// u = ~li.ctl in place of its registered U input.  This is this design's own
// way of supplying the constant; it relies on the ctl sequence running on
// for one slot after the last word, like the masking gates do.
//
// Interface: link in (li) and link out (lo) of type inv_link_t, two clocks
// apart.  Asynchronous active-low reset (own choice).
module gf2m_inv_cell
  import gf2m_pkg::*;
#(
  parameter bit UNIT_U = 1'b0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  inv_link_t li,
  output inv_link_t lo
);

  logic s_d, u_r, v_d, ctl_d;
  logic f_d1, f_d2;
  logic rm_q, st_q, c3_q;
  logic u_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_d   <= 1'b0;
      u_r   <= 1'b0;
      v_d   <= 1'b0;
      ctl_d <= 1'b1;
      f_d1  <= 1'b0;
      f_d2  <= 1'b0;
    end else begin
      s_d   <= li.s;
      u_r   <= li.u;
      v_d   <= li.v;
      ctl_d <= li.ctl;
      f_d1  <= li.f;
      f_d2  <= f_d1;
    end
  end

  assign u_d = UNIT_U ? ~li.ctl : u_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rm_q <= 1'b0;
      st_q <= 1'b0;
      c3_q <= 1'b0;
    end else if (!li.ctl) begin
      rm_q <= li.r;
      st_q <= li.st;
      c3_q <= li.st & li.f;
    end
  end

  logic ctrl1, ctrl2, ctrl3;
  assign ctrl1 = ~st_q & rm_q;
  assign ctrl2 = rm_q;
  assign ctrl3 = c3_q;

  logic r_lo, t_lo, f_hi, inc;
  logic r_n, s_n, t_n, u_n, v_n, f_n;

  always_comb begin
    r_lo = li.r & li.ctl;
    t_lo = li.t & li.ctl;
    f_hi = li.f & li.ctl;
    inc  = ctl_d ? f_d2 : li.cz;

    r_n  = r_lo ^ (ctrl2 & s_d);
    s_n  = ctrl1 ? r_lo : s_d;
    t_n  = ctrl1 ? u_d : (t_lo ^ (ctrl2 & st_q & u_d));   // x*T, no reduction
    u_n  = ctrl3 ? (t_n ^ v_d) : u_d;
    v_n  = ctrl3 ? u_d : v_d;
    f_n  = st_q ? f_hi : inc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo <= '0;
      lo.ctl <= 1'b1;
    end else begin
      lo.ctl <= ctl_d;
      lo.r   <= r_n;
      lo.s   <= s_n;
      lo.t   <= t_n;
      lo.u   <= u_n;
      lo.v   <= v_n;
      lo.f   <= f_n;
      lo.st  <= st_q ^ (ctrl1 | ctrl3);
      lo.cz  <= ctrl3;
    end
  end

endmodule
