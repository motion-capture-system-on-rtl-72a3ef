// viewport_transformer: scale and shift coordinates (Viewport Transformer).
//
// One multiplication by [SX 0 0 TX; 0 SY 0 TY; 0 0 SZ TZ; 0 0 0 1].
// The defaults map normalised coordinates (x within +-16, y within +-12) onto
// an 800x600 screen with y pointing down and depth scaled by 50, the design's
// prototype formulas at full screen size. With other parameters the same
// module maps camera pixel coordinates to world coordinates at the input of
// the model generator. Defaults are fixed-point raw values (value * 64).
//
// Timing: one clock, throughput one.
module viewport_transformer
  import mocap_pkg::*;
#(
  parameter fx_t SX = 18'sd1600,   // 25
  parameter fx_t SY = -18'sd1600,  // -25
  parameter fx_t SZ = 18'sd3200,   // 50
  parameter fx_t TX = 18'sd25600,  // 400
  parameter fx_t TY = 18'sd19200,  // 300
  parameter fx_t TZ = 18'sd0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  vec4_t v,
  output logic  out_valid,
  output vec4_t r
);
  mat4_t m;
  assign m = mat_make(SX, '0, '0, TX,
                      '0, SY, '0, TY,
                      '0, '0, SZ, TZ,
                      '0, '0, '0, FX_ONE);

  matrix_mult mm (.clk, .rst, .in_valid, .m, .v, .out_valid, .r);
endmodule
