// lift97_step: one step of the (9,7) lifting 1-D DWT, purely combinational.
//
// A step is taken each time the next even sample x[2n+2] of a stream arrives.
// From the state kept since the previous step (x[2n], x[2n+1], d1[n-1], s1[n-1],
// d2[n-2]) it forms the four lifting updates
//   d1[n]   = x[2n+1] + alpha*(x[2n]   + x[2n+2])
//   s1[n]   = x[2n]   + beta *(d1[n-1] + d1[n])
//   d2[n-1] = d1[n-1] + gamma*(s1[n-1] + s1[n])
//   s2[n-1] = s1[n-1] + delta*(d2[n-2] + d2[n-1])
// and delivers the scaled low-pass s2[n-1]/zeta (sample position 2n-2) and
// high-pass zeta*d2[n-1] (position 2n-1): both lie four positions behind the
// even input. The next state holds x[2n+2], d1[n], s1[n], d2[n-1]; the odd
// slot is left for the caller to fill with x[2n+3].
// The lifting order follows the conventional (9,7) factorisation; the
// arithmetic (see dwt97_pkg) is this design's choice.
module lift97_step
  import dwt97_pkg::*;
(
  input  lift_state_t st_in,    // state before the step
  input  word_t       x_even,   // new even sample x[2n+2]
  output lift_state_t st_out,   // state after the step (o copied from st_in)
  output word_t       low,      // scaled s2[n-1]
  output word_t       high      // scaled d2[n-1]
);

  word_t d1, s1, d2, s2;

  always_comb begin
    d1 = lift_mac(st_in.o,  st_in.e,  x_even, C_ALPHA);
    s1 = lift_mac(st_in.e,  st_in.d1, d1,     C_BETA);
    d2 = lift_mac(st_in.d1, st_in.s1, s1,     C_GAMMA);
    s2 = lift_mac(st_in.s1, st_in.d2, d2,     C_DELTA);
    low  = scale(s2, C_LOW);
    high = scale(d2, C_HIGH);
    st_out = '{e: x_even, o: st_in.o, d1: d1, s1: s1, d2: d2};
  end

endmodule
