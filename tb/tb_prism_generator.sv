// tb_prism_generator: checks the prism built around random bones.
//
// For each bone the testbench checks, in floating point with a tolerance
// for the fixed-point rounding: the front normal is the unit bone direction;
// the top and side normals are unit length and perpendicular to it and to
// each other; v0..v3 sit around p1 and v4..v7 around p2 at +-A +-B with the
// numbering v0 = p1 + A - B, v1 = p1 + A + B, v2 = p1 - A + B; a bone along x
// uses the y and z axes; 'done' comes within 120 clocks.
module tb_prism_generator;
  import mocap_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  vec4_t p1 = '0, p2 = '0;
  logic busy, done;
  vec4_t vtx [8];
  vec4_t nrm [6];
  int checks = 0, failures = 0;

  prism_generator dut (.clk, .rst, .start, .p1, .p2, .busy, .done, .vtx, .nrm);

  always #5 clk = ~clk;

  function automatic real rv(input fx_t a);
    return real'(longint'(a)) / 64.0;
  endfunction

  function automatic real dot3(input real a [3], input real b [3]);
    return a[0] * b[0] + a[1] * b[1] + a[2] * b[2];
  endfunction

  task automatic near(input string what, input real got, input real e, input real tol);
    checks++;
    if (got - e > tol || e - got > tol) begin
      failures++;
      if (failures < 15) $display("%s: got %f exp %f", what, got, e);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real a [3], input real b [3]);
    int lat;
    real u [3], na [3], nb [3], len, q1 [3], q2 [3];
    real vv [8][3];
    @(negedge clk);
    p1 = vec_make(fx_t'(longint'(a[0] * 64)), fx_t'(longint'(a[1] * 64)), fx_t'(longint'(a[2] * 64)));
    p2 = vec_make(fx_t'(longint'(b[0] * 64)), fx_t'(longint'(b[1] * 64)), fx_t'(longint'(b[2] * 64)));
    for (int k = 0; k < 3; k++) begin
      q1[k] = real'(longint'(a[k] * 64)) / 64.0;
      q2[k] = real'(longint'(b[k] * 64)) / 64.0;
    end
    start = 1;
    @(negedge clk) start = 0;
    lat = 0;
    while (!done && lat < 400) begin @(negedge clk); lat++; end
    checks++;
    if (lat > 120) failures++;
    len = $sqrt((q1[0] - q2[0]) ** 2 + (q1[1] - q2[1]) ** 2 + (q1[2] - q2[2]) ** 2);
    for (int k = 0; k < 3; k++) u[k] = (q1[k] - q2[k]) / len;
    na = '{rv(nrm[2].x), rv(nrm[2].y), rv(nrm[2].z)};
    nb = '{rv(nrm[5].x), rv(nrm[5].y), rv(nrm[5].z)};
    near("front.x", rv(nrm[0].x), u[0], 0.06);
    near("front.y", rv(nrm[0].y), u[1], 0.06);
    near("front.z", rv(nrm[0].z), u[2], 0.06);
    near("back.x", rv(nrm[1].x), -rv(nrm[0].x), 0.0);
    near("bottom.y", rv(nrm[3].y), -na[1], 0.0);
    near("left.z", rv(nrm[4].z), -nb[2], 0.0);
    near("|A|", dot3(na, na), 1.0, 0.15);
    near("|B|", dot3(nb, nb), 1.0, 0.15);
    near("A.U", dot3(na, u), 0.0, 0.08);
    near("B.U", dot3(nb, u), 0.0, 0.08);
    near("A.B", dot3(na, nb), 0.0, 0.08);
    for (int i = 0; i < 8; i++) vv[i] = '{rv(vtx[i].x), rv(vtx[i].y), rv(vtx[i].z)};
    for (int k = 0; k < 3; k++) begin
      near("v0", vv[0][k], q1[k] + na[k] - nb[k], 0.02);
      near("v1", vv[1][k], q1[k] + na[k] + nb[k], 0.02);
      near("v2", vv[2][k], q1[k] - na[k] + nb[k], 0.02);
      near("v3", vv[3][k], q1[k] - na[k] - nb[k], 0.02);
      near("v4", vv[4][k], q2[k] + na[k] - nb[k], 0.02);
      near("v6", vv[6][k], q2[k] - na[k] + nb[k], 0.02);
    end
  endtask

  initial begin
    real a [3], b [3];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // the design's test prism: (-1,-1,-1) to (1,1,1)
    a = '{1.0, 1.0, 1.0}; b = '{-1.0, -1.0, -1.0};
    run(a, b);
    // bone along x: A and B are the y and z axes
    a = '{3.0, 0.5, 0.5}; b = '{-2.0, 0.5, 0.5};
    run(a, b);
    near("A along y", rv(nrm[2].y), 1.0, 0.0);
    near("B along z", rv(nrm[5].z), 1.0, 0.0);
    for (int i = 0; i < 40; i++) begin
      real d;
      for (int k = 0; k < 3; k++) begin
        a[k] = real'($urandom_range(0, 1600)) / 64.0 - 12.5;
        b[k] = real'($urandom_range(0, 1600)) / 64.0 - 12.5;
      end
      d = (a[0] - b[0]) ** 2 + (a[1] - b[1]) ** 2 + (a[2] - b[2]) ** 2;
      if (d < 4.0) a[0] += 3.0;
      run(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
