// dwt97_pkg: shared types and constants of the (9,7) lifting 2-D DWT.
//
// All datapath words are 16-bit two's complement, the internal wordlength the
// architecture is sized for. Samples carry FRAC fractional bits (pixels enter as
// pixel << FRAC). Lifting multipliers are CF-bit fixed-point constants. A lifting
// update is  base + round(coef * (u + v) / 2^CF),  with rounding half up, and the
// result wraps to 16 bits (the chosen FRAC leaves headroom for 8-bit pixels).
// The four lifting constants and the scale factor are the usual (9,7) values;
// their fixed-point encoding, FRAC and the rounding rule are this design's choice.
package dwt97_pkg;

  localparam int unsigned W    = 16;  // internal wordlength
  localparam int unsigned PIXW = 8;   // pixel width in the frame memory
  localparam int unsigned FRAC = 2;   // fractional bits of a sample
  localparam int unsigned CF   = 12;  // fractional bits of a lifting constant

  typedef logic signed [W-1:0] word_t;

  // alpha, beta, gamma, delta, 1/zeta, zeta scaled by 2^12 and rounded
  localparam word_t C_ALPHA = -16'sd6497;  // -1.586134342
  localparam word_t C_BETA  = -16'sd217;   // -0.052980118
  localparam word_t C_GAMMA =  16'sd3616;  //  0.882911076
  localparam word_t C_DELTA =  16'sd1817;  //  0.443506852
  localparam word_t C_LOW   =  16'sd3330;  //  1/1.230174105 (low-pass gain)
  localparam word_t C_HIGH  =  16'sd5039;  //  1.230174105   (high-pass gain)

  // (9,7) analysis filters for the convolution-based unit, same gains as the
  // lifting unit (low-pass DC gain 1, high-pass Nyquist gain 2), scaled by 2^12.
  // Low-pass taps h0..h4 (centre outwards), high-pass taps g0..g3.
  localparam word_t C_H0 =  16'sd2470;   //  0.602949018
  localparam word_t C_H1 =  16'sd1093;   //  0.266864118
  localparam word_t C_H2 = -16'sd320;    // -0.078223267
  localparam word_t C_H3 = -16'sd69;     // -0.016864118
  localparam word_t C_H4 =  16'sd110;    //  0.026748757
  localparam word_t C_G0 =  16'sd4567;   //  1.115087052
  localparam word_t C_G1 = -16'sd2422;   // -0.591271763
  localparam word_t C_G2 = -16'sd236;    // -0.057543526
  localparam word_t C_G3 =  16'sd374;    //  0.091271763

  // State one 1-D lifting unit keeps for one sample stream between two steps:
  // even input, odd input, last d1, last s1, last d2 (five 16-bit words).
  typedef struct packed {
    word_t e;
    word_t o;
    word_t d1;
    word_t s1;
    word_t d2;
  } lift_state_t;

  localparam int unsigned STATE_W = $bits(lift_state_t);

  // Implementation styles of the temporal buffer (and, for LB_CONV_ROT, of the
  // across-line unit itself).
  typedef enum logic [1:0] {
    LB_TWO_PORT  = 2'd0,  // one two-port memory, full rate
    LB_PING_PONG = 2'd1,  // two single-port memories, full rate
    LB_FOLDED    = 2'd2,  // one single-port memory, half rate
    LB_CONV_ROT  = 2'd3   // convolution unit, F rotating single-port memories
  } lb_mode_e;

  // base + round(coef * (u + v) / 2^CF)
  function automatic word_t lift_mac(word_t base, word_t u, word_t v, word_t coef);
    logic signed [W:0]        sum;
    logic signed [2*W+1:0]    prod;
    sum  = (W+1)'(u) + (W+1)'(v);
    prod = (2*W+2)'(sum) * (2*W+2)'(coef) + (2*W+2)'(1 << (CF - 1));
    return base + word_t'(prod >>> CF);
  endfunction

  // round(coef * u / 2^CF)
  function automatic word_t scale(word_t u, word_t coef);
    logic signed [2*W-1:0] prod;
    prod = (2*W)'(u) * (2*W)'(coef) + (2*W)'(1 << (CF - 1));
    return word_t'(prod >>> CF);
  endfunction

endpackage
