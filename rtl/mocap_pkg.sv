// mocap_pkg: types and fixed-point / vector arithmetic shared by the motion
// capture design.
//
// Video side: a tracked joint is an (x, y, z, colour) record of 34 bits,
// a bone is a pair of joints. Graphics side: every number is an 18-bit
// two's-complement fixed-point value with FX_F fraction bits, a vector is
// four of them (x, y, z, w, homogeneous coordinates) and a matrix is 4x4.
// The 18-bit width follows the design; the number of fraction bits (6) is
// this implementation's choice, picked so 800x600 pixel coordinates fit.
//
// The functions are combinational. Multiplication and addition saturate to
// the most positive / negative value instead of wrapping. The vector
// functions ignore w and return w = 1.0, like the cross product of the design.
package mocap_pkg;

  // ---------------- video side ----------------
  typedef enum logic [1:0] {RED = 2'd0, YELLOW = 2'd1, GREEN = 2'd2, BLUE = 2'd3} color_t;

  typedef struct packed {
    logic [10:0] x;      // from camera #2 (front view), horizontal
    logic [10:0] y;      // from camera #1 (side view), horizontal
    logic [9:0]  z;      // vertical, from camera #1
    logic [1:0]  color;  // color_t value
  } xyz_t;               // 34 bits

  typedef struct packed {
    xyz_t a;
    xyz_t b;
  } bone_t;              // 68 bits

  // ---------------- fixed point ----------------
  localparam int FX_W = 18;
  localparam int FX_F = 6;
  typedef logic signed [FX_W-1:0] fx_t;
  localparam fx_t FX_ONE = fx_t'(1 << FX_F);
  localparam fx_t FX_MAX = fx_t'({1'b0, {(FX_W-1){1'b1}}});
  localparam fx_t FX_MIN = fx_t'({1'b1, {(FX_W-1){1'b0}}});

  typedef struct packed {
    fx_t x;
    fx_t y;
    fx_t z;
    fx_t w;
  } vec4_t;

  typedef fx_t [3:0][3:0] mat4_t;  // m[row][col]

  // Clamp a wide signed value into fx_t.
  function automatic fx_t fx_sat(input logic signed [63:0] a);
    if (a > 64'(FX_MAX)) return FX_MAX;
    if (a < 64'(FX_MIN)) return FX_MIN;
    return fx_t'(a);
  endfunction

  // Pack an integer and fraction part (Pack wrapper).
  function automatic fx_t fx_pack(input logic signed [FX_W-1:0] ipart, input logic [FX_F-1:0] fpart);
    return fx_sat((64'(ipart) <<< FX_F) + 64'(fpart));
  endfunction

  function automatic fx_t fx_from_int(input int i);
    return fx_sat(64'(i) <<< FX_F);
  endfunction

  // Integer part (floor) of a fixed point number (Unpack wrapper).
  function automatic int fx_int(input fx_t a);
    return int'(a) >>> FX_F;
  endfunction

  function automatic fx_t fx_add(input fx_t a, input fx_t b);
    return fx_sat(64'(a) + 64'(b));
  endfunction

  function automatic fx_t fx_sub(input fx_t a, input fx_t b);
    return fx_sat(64'(a) - 64'(b));
  endfunction

  // Mult: the product has 2*FX_F fraction bits, shift right by FX_F.
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return fx_sat(p >>> FX_F);
  endfunction

  function automatic vec4_t vec_make(input fx_t x, input fx_t y, input fx_t z);
    vec4_t r;
    r.x = x; r.y = y; r.z = z; r.w = FX_ONE;
    return r;
  endfunction

  function automatic vec4_t vec_sum(input vec4_t a, input vec4_t b);
    return vec_make(fx_add(a.x, b.x), fx_add(a.y, b.y), fx_add(a.z, b.z));
  endfunction

  function automatic vec4_t vec_dif(input vec4_t a, input vec4_t b);
    return vec_make(fx_sub(a.x, b.x), fx_sub(a.y, b.y), fx_sub(a.z, b.z));
  endfunction

  function automatic vec4_t vec_scale(input vec4_t a, input fx_t s);
    return vec_make(fx_mul(a.x, s), fx_mul(a.y, s), fx_mul(a.z, s));
  endfunction

  function automatic vec4_t vec_neg(input vec4_t a);
    return vec_make(fx_sub('0, a.x), fx_sub('0, a.y), fx_sub('0, a.z));
  endfunction

  function automatic fx_t vec_dot(input vec4_t a, input vec4_t b);
    logic signed [63:0] s;
    s = 64'(a.x) * 64'(b.x) + 64'(a.y) * 64'(b.y) + 64'(a.z) * 64'(b.z);
    return fx_sat(s >>> FX_F);
  endfunction

  function automatic vec4_t vec_cross(input vec4_t u, input vec4_t v);
    logic signed [63:0] cx, cy, cz;
    cx = 64'(u.y) * 64'(v.z) - 64'(u.z) * 64'(v.y);
    cy = 64'(u.z) * 64'(v.x) - 64'(u.x) * 64'(v.z);
    cz = 64'(u.x) * 64'(v.y) - 64'(u.y) * 64'(v.x);
    return vec_make(fx_sat(cx >>> FX_F), fx_sat(cy >>> FX_F), fx_sat(cz >>> FX_F));
  endfunction

  // 4x4 matrix times 4x1 vector, full-width sums, one saturation per row.
  function automatic vec4_t mat_vec_mul(input mat4_t m, input vec4_t v);
    fx_t vin [4];
    fx_t vout [4];
    logic signed [63:0] s;
    vin[0] = v.x; vin[1] = v.y; vin[2] = v.z; vin[3] = v.w;
    for (int r = 0; r < 4; r++) begin
      s = '0;
      for (int c = 0; c < 4; c++) s = s + 64'(m[r][c]) * 64'(vin[c]);
      vout[r] = fx_sat(s >>> FX_F);
    end
    return {vout[0], vout[1], vout[2], vout[3]};
  endfunction

  // Matrix builders (Pack Matrix).
  function automatic mat4_t mat_make(input fx_t a00, a01, a02, a03,
                                     input fx_t a10, a11, a12, a13,
                                     input fx_t a20, a21, a22, a23,
                                     input fx_t a30, a31, a32, a33);
    mat4_t m;
    m[0][0] = a00; m[0][1] = a01; m[0][2] = a02; m[0][3] = a03;
    m[1][0] = a10; m[1][1] = a11; m[1][2] = a12; m[1][3] = a13;
    m[2][0] = a20; m[2][1] = a21; m[2][2] = a22; m[2][3] = a23;
    m[3][0] = a30; m[3][1] = a31; m[3][2] = a32; m[3][3] = a33;
    return m;
  endfunction

  // ---------------- rendering ----------------
  // One 18-bit half of a ZBT word: leading 0, colour, shade, depth.
  typedef struct packed {
    logic       zero;
    logic [1:0] color;
    logic [3:0] shade;
    logic [10:0] depth;
  } pix_word_t;

  localparam logic [10:0] DEPTH_FAR = 11'h7FF;

endpackage
