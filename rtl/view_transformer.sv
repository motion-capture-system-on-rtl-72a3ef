// view_transformer: world coordinates to camera coordinates.
//
// Rotation about x by ax, then about y by ay, then about z by az, then a
// translation by (dx, dy, dz), each a 4x4 matrix multiplication:
//   Rx = [1 0 0 0; 0 c -s 0; 0 s c 0; 0 0 0 1]
//   Ry = [c 0 s 0; 0 1 0 0; -s 0 c 0; 0 0 0 1]
//   Rz = [c -s 0 0; s c 0 0; 0 0 1 0; 0 0 0 1]
//   T  = [1 0 0 dx; 0 1 0 dy; 0 0 1 dz; 0 0 0 1]
// Four matrix multipliers in a row give a latency of four clocks and a
// throughput of one vertex per clock, as in the design. Sines and cosines
// come from look-up tables; the angles and offsets must be held steady while
// vertices flow.
module view_transformer
  import mocap_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  fx_t   ax, ay, az,
  input  fx_t   dx, dy, dz,
  input  logic  in_valid,
  input  vec4_t v,
  output logic  out_valid,
  output vec4_t r
);
  fx_t   sx, cx, sy, cy, sz, cz;
  mat4_t mrx, mry, mrz, mt;
  logic  [3:0] vld;
  vec4_t s1, s2, s3;

  sin_cos_lut lut_x (.angle(ax), .sin_o(sx), .cos_o(cx));
  sin_cos_lut lut_y (.angle(ay), .sin_o(sy), .cos_o(cy));
  sin_cos_lut lut_z (.angle(az), .sin_o(sz), .cos_o(cz));

  always_comb begin
    mrx = mat_make(FX_ONE, '0, '0, '0,
                   '0, cx, fx_sub('0, sx), '0,
                   '0, sx, cx, '0,
                   '0, '0, '0, FX_ONE);
    mry = mat_make(cy, '0, sy, '0,
                   '0, FX_ONE, '0, '0,
                   fx_sub('0, sy), '0, cy, '0,
                   '0, '0, '0, FX_ONE);
    mrz = mat_make(cz, fx_sub('0, sz), '0, '0,
                   sz, cz, '0, '0,
                   '0, '0, FX_ONE, '0,
                   '0, '0, '0, FX_ONE);
    mt  = mat_make(FX_ONE, '0, '0, dx,
                   '0, FX_ONE, '0, dy,
                   '0, '0, FX_ONE, dz,
                   '0, '0, '0, FX_ONE);
  end

  matrix_mult mm_x (.clk, .rst, .in_valid(in_valid), .m(mrx), .v(v),  .out_valid(vld[0]), .r(s1));
  matrix_mult mm_y (.clk, .rst, .in_valid(vld[0]),   .m(mry), .v(s1), .out_valid(vld[1]), .r(s2));
  matrix_mult mm_z (.clk, .rst, .in_valid(vld[1]),   .m(mrz), .v(s2), .out_valid(vld[2]), .r(s3));
  matrix_mult mm_t (.clk, .rst, .in_valid(vld[2]),   .m(mt),  .v(s3), .out_valid(vld[3]), .r(r));

  assign out_valid = vld[3];
endmodule
