// tb_mocap_pkg: checks the shared fixed-point and vector functions.
//
// Random operands are drawn as plain integers; every result of the package
// (add, subtract, multiply with saturation, int conversion both ways, pack,
// dot and cross products, scaling, negation, matrix times vector) is compared
// with the same arithmetic done here on 64-bit integers.
module tb_mocap_pkg;
  import mocap_pkg::*;
  int checks = 0, failures = 0;

  function automatic longint sat(input longint a);
    if (a > 131071) return 131071;
    if (a < -131072) return -131072;
    return a;
  endfunction

  function automatic longint L(input fx_t a);
    return longint'(a);
  endfunction

  task automatic expect_eq(input string what, input longint got, input longint e);
    checks++;
    if (got != e) begin
      failures++;
      if (failures < 10) $display("%s: got %0d exp %0d", what, got, e);
    end
  endtask

  function automatic longint rnd(input bit big);
    return big ? longint'($urandom_range(0, 262143)) - 131072 : longint'($urandom_range(0, 4000)) - 2000;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_eq("one", L(FX_ONE), 64);
    expect_eq("max", L(FX_MAX), 131071);
    expect_eq("min", L(FX_MIN), -131072);
    for (int i = 0; i < 3000; i++) begin
      longint a, b, c, d, e, f, g, h;
      vec4_t u, v, r;
      mat4_t m;
      longint mm [4][4], vi [4];
      int k;
      bit big;
      big = (i % 3 == 0);
      a = rnd(big); b = rnd(big); c = rnd(big); d = rnd(big); e = rnd(big); f = rnd(big);
      expect_eq("add", L(fx_add(fx_t'(a), fx_t'(b))), sat(a + b));
      expect_eq("sub", L(fx_sub(fx_t'(a), fx_t'(b))), sat(a - b));
      expect_eq("mul", L(fx_mul(fx_t'(a), fx_t'(b))), sat((a * b) >>> 6));
      k = int'($urandom_range(0, 8000)) - 4000;
      expect_eq("from_int", L(fx_from_int(k)), sat(longint'(k) * 64));
      expect_eq("int", longint'(fx_int(fx_t'(a))), a >>> 6);
      g = longint'($urandom_range(0, 4000)) - 2000; h = longint'($urandom_range(0, 63));
      expect_eq("pack", L(fx_pack(fx_t'(g), 6'(h))), sat(g * 64 + h));
      u = vec_make(fx_t'(a), fx_t'(b), fx_t'(c));
      v = vec_make(fx_t'(d), fx_t'(e), fx_t'(f));
      expect_eq("make.w", L(u.w), 64);
      expect_eq("dot", L(vec_dot(u, v)), sat((a * d + b * e + c * f) >>> 6));
      r = vec_cross(u, v);
      expect_eq("cross.x", L(r.x), sat((b * f - c * e) >>> 6));
      expect_eq("cross.y", L(r.y), sat((c * d - a * f) >>> 6));
      expect_eq("cross.z", L(r.z), sat((a * e - b * d) >>> 6));
      r = vec_sum(u, v);
      expect_eq("sum.y", L(r.y), sat(b + e));
      r = vec_dif(u, v);
      expect_eq("dif.z", L(r.z), sat(c - f));
      r = vec_scale(u, fx_t'(d));
      expect_eq("scale.x", L(r.x), sat((a * d) >>> 6));
      r = vec_neg(u);
      expect_eq("neg.y", L(r.y), sat(-b));
      for (int x = 0; x < 4; x++) for (int y = 0; y < 4; y++) mm[x][y] = rnd(0) / 8;
      vi = '{a, b, c, 64};
      m = mat_make(fx_t'(mm[0][0]), fx_t'(mm[0][1]), fx_t'(mm[0][2]), fx_t'(mm[0][3]),
                   fx_t'(mm[1][0]), fx_t'(mm[1][1]), fx_t'(mm[1][2]), fx_t'(mm[1][3]),
                   fx_t'(mm[2][0]), fx_t'(mm[2][1]), fx_t'(mm[2][2]), fx_t'(mm[2][3]),
                   fx_t'(mm[3][0]), fx_t'(mm[3][1]), fx_t'(mm[3][2]), fx_t'(mm[3][3]));
      r = mat_vec_mul(m, u);
      for (int x = 0; x < 4; x++) begin
        longint s;
        s = 0;
        for (int y = 0; y < 4; y++) s += mm[x][y] * vi[y];
        expect_eq($sformatf("mat row %0d", x), (x == 0) ? L(r.x) : (x == 1) ? L(r.y) : (x == 2) ? L(r.z) : L(r.w), sat(s >>> 6));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
