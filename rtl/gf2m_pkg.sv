// Shared types of the bit-serial GF(2^m) Euclid divider and inverter.
//
// Words travel between the basic cells of the systolic arrays one bit per
// clock, most significant coefficient first.  Every line of the link is one
// bit wide, so the link types below do not depend on the field size m.
//
//   ctl  : framing control, 0 in the first (MSB) slot of each word, 1 in the
//          other m-1 slots (the repeating sequence 0 1 1 ... 1).
//   r,s  : coefficient streams of the remainder pair R and S (s_m is always
//          1 and is not transmitted).
//   t,u,v: coefficient streams of the cofactor polynomials T, U and V.
//   g    : coefficient stream of the field polynomial G (g_{m-1} .. g_0),
//          divider only.
//   f    : one-hot count flag; a 1 in slot j-1 means count == j (1..m).
//   st   : algorithm state (0 = degree counting up, 1 = counting down),
//          constant over the whole word.
//   cz   : count-zero flag (count == 0), constant over the whole word.
package gf2m_pkg;

  typedef struct packed {
    logic ctl;
    logic r;
    logic s;
    logic t;
    logic u;
    logic v;
    logic g;
    logic f;
    logic st;
    logic cz;
  } div_link_t;

  typedef struct packed {
    logic ctl;
    logic r;
    logic s;
    logic t;
    logic u;
    logic v;
    logic f;
    logic st;
    logic cz;
  } inv_link_t;

endpackage
