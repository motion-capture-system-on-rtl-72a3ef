// sin_cos_lut: sine and cosine of a fixed-point angle in radians.
//
// The angle (FX_F fraction bits) is reduced modulo 2*pi, rounded to the
// nearest step, and folded into the first quadrant, where a table holds
// sin(k / 2^FX_F) for every step k up to pi/2 (101 entries at FX_F = 6).
// The table is computed at elaboration from the Taylor series
// sin x = x - x^3/3! + x^5/5! - x^7/7! + x^9/9! in integer arithmetic with
// 30 fraction bits. cos(a) is read as sin(a + pi/2). The design asks only for
// "a simple look up table" that need not be precise; the folding and the
// table size are this design's choices. Error is about one fraction step.
//
// Timing: combinational.
module sin_cos_lut
  import mocap_pkg::*;
(
  input  fx_t angle,
  output fx_t sin_o,
  output fx_t cos_o
);
  localparam int TWO_PI  = 402;  // round(2*pi*64)
  localparam int PI      = 201;
  localparam int HALF_PI = 101;
  localparam int NT      = 101;  // entries 0..100
  typedef logic [FX_F:0] lut_t [NT];

  function automatic lut_t build_lut();
    lut_t t;
    longint x, term, sum;
    for (int k = 0; k < NT; k++) begin
      x    = longint'(k) <<< (30 - FX_F);
      term = x;
      sum  = x;
      for (int n = 1; n <= 5; n++) begin
        term = -(((term * x) >>> 30) * x >>> 30) / longint'((2 * n) * (2 * n + 1));
        sum  = sum + term;
      end
      t[k] = (FX_F + 1)'((sum + (longint'(1) <<< (29 - FX_F))) >>> (30 - FX_F));
    end
    return t;
  endfunction

  localparam lut_t SIN_T = build_lut();

  function automatic fx_t sin_of(input int k);  // 0 <= k < TWO_PI
    if (k < HALF_PI)  return fx_t'(SIN_T[k]);
    if (k < PI)       return fx_t'(SIN_T[PI - k]);
    if (k < PI + HALF_PI) return -fx_t'(SIN_T[k - PI]);
    return -fx_t'(SIN_T[TWO_PI - k]);
  endfunction

  int k;
  always_comb begin
    k = int'(angle) % TWO_PI;
    if (k < 0) k = k + TWO_PI;
    sin_o = sin_of(k);
    cos_o = sin_of((k + HALF_PI) % TWO_PI);
  end
endmodule
