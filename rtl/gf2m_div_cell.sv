// Basic cell of the bit-serial systolic divider for GF(2^m).
//
// One cell performs one iteration of the fixed-length (2m-2 iterations)
// variant of Euclid's algorithm on words that arrive one coefficient per
// clock, MSB first:
//
//   R = x*R;  T = x*T mod G;  (r_m is the MSB of the incoming R word)
//   Ctrl1 = (state==0) & r_m   : R = R+S, S = old x*R, T = U, state = 1
//   Ctrl2 = r_m, in state 1    : R = R+S, T = T+U
//   Ctrl3 = (state==1) & (count becomes 0) : U = T+V, V = U, state = 0
//
// The degree counter is not stored as a binary number.  It rides in the
// data stream as a one-hot flag (f line, slot j-1 means count == j) plus a
// word-level count-zero bit (cz line); counting up moves the flag one slot
// towards the LSB, counting down one slot towards the MSB.  This removes the
// log2(m+1)-bit adder from every cell, as the published design proposes.
//
// How the serial schedule works.  When the first slot of a word arrives
// (li.ctl == 0) the cell latches r_m, t_{m-1}, the state and Ctrl3, and
// holds them for the m slots of the word (the "four latches and four 2-to-1
// multiplexers" of the published cell).  Multiplication by x means output
// coefficient k needs input coefficient k-1 of R, T and f, which arrives one
// clock after coefficient k of S, U, V and G.  So S, U, V, G and ctl pass an
// input register first and are combined with the live R, T and f inputs.  In
// the last slot of a word the live inputs already carry the next word's
// MSB; three AND gates with li.ctl replace them by the zeros that enter at
// the LSB end (r_{-1}, t_{-1}, and the count flag above slot m-1).  For the
// first slot the count flag that moves up comes from the cz line.
//
// Timing: every line has a latency of exactly two clocks through the cell,
// so the 2m-2 cells of the array delay a word by 4m-4 clocks.  A new word may
// start every m clocks; the ctl sequence must keep running for one slot
// after the last word so that the last slot is closed.
//
// Following the published design: the iteration, the control equations, the
// one-hot count tracing, the latched broadcast controls and the masking AND
// gates.  This design's own choices: the exact register placement, carrying
// state and cz as word-long lines, and the asynchronous active-low reset.
module gf2m_div_cell
  import gf2m_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  div_link_t li,
  output div_link_t lo
);

  // Slot-aligned copies of the streams that are not shifted by x.
  logic s_d, u_d, v_d, g_d, ctl_d;
  // Count flag delayed two clocks: coefficient k-1 while slot k is formed.
  logic f_d1, f_d2;
  // Word-level controls latched in the first slot of a word.
  logic rm_q, tm_q, st_q, c3_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_d   <= 1'b0;
      u_d   <= 1'b0;
      v_d   <= 1'b0;
      g_d   <= 1'b0;
      ctl_d <= 1'b1;
      f_d1  <= 1'b0;
      f_d2  <= 1'b0;
    end else begin
      s_d   <= li.s;
      u_d   <= li.u;
      v_d   <= li.v;
      g_d   <= li.g;
      ctl_d <= li.ctl;
      f_d1  <= li.f;
      f_d2  <= f_d1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rm_q <= 1'b0;
      tm_q <= 1'b0;
      st_q <= 1'b0;
      c3_q <= 1'b0;
    end else if (!li.ctl) begin
      rm_q <= li.r;                 // r_m of x*R  (= r_{m-1} of R)
      tm_q <= li.t;                 // t_{m-1}, decides the reduction by G
      st_q <= li.st;
      c3_q <= li.st & li.f;         // count 1 -> 0 in state 1
    end
  end

  logic ctrl1, ctrl2, ctrl3;
  assign ctrl1 = ~st_q & rm_q;      // eq. (10)
  assign ctrl2 = rm_q;
  assign ctrl3 = c3_q;

  logic r_lo, t_lo, f_hi, inc;
  logic t_sh, r_n, s_n, t_n, u_n, v_n, f_n;

  always_comb begin
    // Lower neighbours; zero below the LSB (next word's MSB masked).
    r_lo = li.r & li.ctl;
    t_lo = li.t & li.ctl;
    f_hi = li.f & li.ctl;
    // Count flag moving towards the LSB: from slot k-1, or from cz in slot 0.
    inc  = ctl_d ? f_d2 : li.cz;

    t_sh = t_lo ^ (tm_q & g_d);                        // x*T mod G
    r_n  = r_lo ^ (ctrl2 & s_d);                       // x*R (+ S)
    s_n  = ctrl1 ? r_lo : s_d;                         // S = x*R on swap
    t_n  = ctrl1 ? u_d : (t_sh ^ (ctrl2 & st_q & u_d)); // T = U or T + U
    u_n  = ctrl3 ? (t_n ^ v_d) : u_d;                  // U = T + V
    v_n  = ctrl3 ? u_d : v_d;                          // V = U
    f_n  = st_q ? f_hi : inc;                          // count -1 / +1
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
      lo.g   <= g_d;
      lo.f   <= f_n;
      lo.st  <= st_q ^ (ctrl1 | ctrl3);
      lo.cz  <= ctrl3;
    end
  end

endmodule
