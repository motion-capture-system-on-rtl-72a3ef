// projection_transformer: camera coordinates to perspective coordinates.
//
// One multiplication by the constant matrix
//   [E 0 0 0; 0 E/a 0 0; 0 0 Q33 Q34; 0 0 1 0]
// with e = 1/tan(fov/2) = 1/0.3, a = height/width = 0.75, far f = 5, near
// n = 0.1, Q33 = -(f+n)/(n-f) and Q34 = 2fn/(n-f). The result's w is the
// camera-space z, so the later division by w shrinks distant objects. The
// constants are the design's software prototype values; its camera looks
// along +z. Defaults are the fixed-point raw values (value * 64).
//
// Timing: one clock, throughput one.
module projection_transformer
  import mocap_pkg::*;
#(
  parameter fx_t E        = 18'sd213,  // 3.33
  parameter fx_t E_OVER_A = 18'sd284,  // 4.44
  parameter fx_t Q33      = 18'sd67,   // 1.04
  parameter fx_t Q34      = -18'sd13   // -0.20
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  vec4_t v,
  output logic  out_valid,
  output vec4_t r
);
  mat4_t m;
  assign m = mat_make(E, '0, '0, '0,
                      '0, E_OVER_A, '0, '0,
                      '0, '0, Q33, Q34,
                      '0, '0, FX_ONE, '0);

  matrix_mult mm (.clk, .rst, .in_valid, .m, .v, .out_valid, .r);
endmodule
