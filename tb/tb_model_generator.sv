// tb_model_generator: checks a bone's screen prism against a float model.
//
// Random bones (camera pixel coordinates) are turned into a prism by the
// block. The testbench rebuilds everything in floating point with the same
// constants: camera-to-world mapping ((x-400)/16, (300-z)/16, (y-400)/16),
// the prism of half-width 1 around the bone, rotation and translation,
// perspective (x*213/64, y*284/64, z*67/64 - 13/64, w = z), division by w and
// the 800x600 viewport. All eight screen vertices must agree within 3 pixels
// and 3 depth units, and the face shades (light along +z, K = 2000, ambient
// 0.4, on the world-space faces) within one step plus what one 1/64 step of
// the normal's z moves the shade at that distance.
module tb_model_generator;
  import mocap_pkg::*;
  localparam int FACE [6][4] = '{'{0, 1, 2, 3}, '{4, 5, 6, 7}, '{4, 5, 1, 0},
                                 '{7, 6, 2, 3}, '{4, 0, 3, 7}, '{1, 5, 6, 2}};
  logic clk = 0, rst = 1, start = 0, busy, done;
  bone_t bone = '0;
  fx_t ax = 0, ay = 0, az = 0, dx = 0, dy = 0, dz = 0;
  vec4_t scr [8];
  logic [3:0] shade [6];
  int checks = 0, failures = 0;

  model_generator dut (.clk, .rst, .start, .bone, .ax, .ay, .az, .dx, .dy, .dz, .busy, .done, .scr, .shade);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rv(input fx_t a);
    return real'(longint'(a)) / 64.0;
  endfunction

  task automatic near(input string what, input real got, input real e, input real tol);
    checks++;
    if (got - e > tol || e - got > tol) begin
      failures++;
      if (failures < 15) $display("%s: got %f exp %f", what, got, e);
    end
  endtask

  task automatic run(input int x1, y1, z1, x2, y2, z2, input real a, b, c, input real tx, ty, tz);
    real p1 [3], p2 [3], u [3], av [3], bv [3], len, v [8][3];
    int lat;
    @(negedge clk);
    bone.a.x = 11'(x1); bone.a.y = 11'(y1); bone.a.z = 10'(z1); bone.a.color = 2'd0;
    bone.b.x = 11'(x2); bone.b.y = 11'(y2); bone.b.z = 10'(z2); bone.b.color = 2'd2;
    ax = fx_t'(longint'(a * 64)); ay = fx_t'(longint'(b * 64)); az = fx_t'(longint'(c * 64));
    a = rv(ax); b = rv(ay); c = rv(az);
    dx = fx_t'(longint'(tx * 64)); dy = fx_t'(longint'(ty * 64)); dz = fx_t'(longint'(tz * 64));
    start = 1;
    @(negedge clk) start = 0;
    lat = 0;
    while (!done && lat < 5000) begin @(negedge clk); lat++; end
    checks++;
    if (lat >= 5000) failures++;
    p1 = '{(x1 - 400) / 16.0, (300 - z1) / 16.0, (y1 - 400) / 16.0};
    p2 = '{(x2 - 400) / 16.0, (300 - z2) / 16.0, (y2 - 400) / 16.0};
    len = $sqrt((p1[0] - p2[0]) ** 2 + (p1[1] - p2[1]) ** 2 + (p1[2] - p2[2]) ** 2);
    for (int k = 0; k < 3; k++) u[k] = (p1[k] - p2[k]) / len;
    len = $sqrt(u[1] ** 2 + u[2] ** 2);
    av = '{0.0, u[2] / len, -u[1] / len};
    bv = '{av[1] * u[2] - av[2] * u[1], av[2] * u[0] - av[0] * u[2], av[0] * u[1] - av[1] * u[0]};
    for (int k = 0; k < 3; k++) begin
      v[0][k] = p1[k] + av[k] - bv[k]; v[1][k] = p1[k] + av[k] + bv[k];
      v[2][k] = p1[k] - av[k] + bv[k]; v[3][k] = p1[k] - av[k] - bv[k];
      v[4][k] = p2[k] + av[k] - bv[k]; v[5][k] = p2[k] + av[k] + bv[k];
      v[6][k] = p2[k] - av[k] + bv[k]; v[7][k] = p2[k] - av[k] - bv[k];
    end
    // shades from the world-space faces
    for (int f = 0; f < 6; f++) begin
      real d, nz, s;
      int e;
      d = 0;
      for (int k = 0; k < 4; k++) d += v[FACE[f][k]][2];
      d = d / 4.0;
      nz = (f == 0) ? u[2] : (f == 1) ? -u[2] : (f == 2) ? av[2] : (f == 3) ? -av[2] : (f == 4) ? -bv[2] : bv[2];
      if (d > 6.0) begin
        s = nz * 2000.0 / (d * d);
        if (s < 0) s = 0;
        s += 0.4;
        if (s > 1) s = 1;
        e = int'($floor(s * 15.0));
        near($sformatf("shade %0d", f), real'(shade[f]), real'(e), 1.0 + 15.0 * 2000.0 / 64.0 / (d * d));
      end
    end
    for (int i = 0; i < 8; i++) begin
      real q [3], r [3], xp, yp, zp, wp;
      q = v[i];
      // Rx, Ry, Rz, then translation
      r = '{q[0], $cos(a) * q[1] - $sin(a) * q[2], $sin(a) * q[1] + $cos(a) * q[2]};
      q = '{$cos(b) * r[0] + $sin(b) * r[2], r[1], -$sin(b) * r[0] + $cos(b) * r[2]};
      r = '{$cos(c) * q[0] - $sin(c) * q[1], $sin(c) * q[0] + $cos(c) * q[1], q[2]};
      r[0] += rv(dx); r[1] += rv(dy); r[2] += rv(dz);
      xp = r[0] * 213.0 / 64.0; yp = r[1] * 284.0 / 64.0;
      zp = r[2] * 67.0 / 64.0 - 13.0 / 64.0; wp = r[2];
      near($sformatf("v%0d.x", i), rv(scr[i].x), 25.0 * xp / wp + 400.0, 3.0);
      near($sformatf("v%0d.y", i), rv(scr[i].y), 300.0 - 25.0 * yp / wp, 3.0);
      near($sformatf("v%0d.z", i), rv(scr[i].z), 50.0 * zp / wp, 3.0);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // a forearm held across the view, pushed 40 units away
    run(300, 560, 250, 500, 600, 350, 0, 0, 0, 0, 0, 40);
    for (int i = 0; i < 25; i++) begin
      int x1, y1, z1, x2, y2, z2;
      x1 = $urandom_range(100, 700); y1 = $urandom_range(480, 700); z1 = $urandom_range(110, 540);
      x2 = $urandom_range(100, 700); y2 = $urandom_range(480, 700); z2 = $urandom_range(110, 540);
      if ((x1 - x2) * (x1 - x2) + (z1 - z2) * (z1 - z2) < 2500) x2 = (x1 > 400) ? x1 - 80 : x1 + 80;
      run(x1, y1, z1, x2, y2, z2, real'($urandom_range(0, 60)) / 100.0 - 0.3,
          real'($urandom_range(0, 60)) / 100.0 - 0.3, real'($urandom_range(0, 60)) / 100.0 - 0.3,
          real'($urandom_range(0, 8)) - 4.0, real'($urandom_range(0, 8)) - 4.0, 40.0 + $urandom_range(0, 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
