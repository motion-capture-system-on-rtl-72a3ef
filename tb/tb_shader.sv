// tb_shader: checks face brightness against the lighting formula.
//
// Each test builds a prism-shaped set of vertices whose six faces sit at
// chosen depths and six face normals with chosen z components. The expected
// shade of a face is floor(15 * min(max(nz * 2000 / d^2, 0) + 0.4, 1)) with d
// the mean z of its four vertices; fixed-point rounding may move it by one
// step. Faces facing away from the light must get the ambient shade 6; a
// face at distance 50 facing the light must be at full brightness.
module tb_shader;
  import mocap_pkg::*;
  localparam int FACE [6][4] = '{'{0, 1, 2, 3}, '{4, 5, 6, 7}, '{4, 5, 1, 0},
                                 '{7, 6, 2, 3}, '{4, 0, 3, 7}, '{1, 5, 6, 2}};
  logic clk = 0, rst = 1, start = 0;
  vec4_t vtx [8];
  vec4_t nrm [6];
  logic busy, done;
  logic [3:0] shade [6];
  fx_t scale [6];
  int checks = 0, failures = 0;

  shader dut (.clk, .rst, .start, .vtx, .nrm, .busy, .done, .shade, .scale);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real vz [8], input real nz [6]);
    int lat;
    @(negedge clk);
    for (int i = 0; i < 8; i++) vtx[i] = vec_make(fx_t'(i * 64), 18'sd0, fx_t'(longint'(vz[i] * 64)));
    for (int f = 0; f < 6; f++) nrm[f] = vec_make(18'sd0, 18'sd0, fx_t'(longint'(nz[f] * 64)));
    start = 1;
    @(negedge clk) start = 0;
    lat = 0;
    while (!done && lat < 800) begin @(negedge clk); lat++; end
    checks++;
    if (lat > 400) failures++;
    for (int f = 0; f < 6; f++) begin
      real d, s;
      int e;
      d = 0;
      for (int k = 0; k < 4; k++) d += real'(longint'(vz[FACE[f][k]] * 64)) / 64.0;
      d = d / 4.0;
      s = real'(longint'(nz[f] * 64)) / 64.0 * 2000.0 / (d * d);
      if (s < 0) s = 0;
      s += 0.4;
      if (s > 1) s = 1;
      e = int'($floor(s * 15.0));
      checks++;
      if (int'(shade[f]) - e > 1 || e - int'(shade[f]) > 1) begin
        failures++;
        if (failures < 10) $display("face %0d d=%f nz=%f shade %0d exp %0d", f, d, nz[f], shade[f], e);
      end
    end
  endtask

  initial begin
    real vz [8], nz [6];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // all faces at distance 50 facing the light: full brightness
    vz = '{50, 50, 50, 50, 50, 50, 50, 50};
    nz = '{1, 1, 1, 1, 1, 1};
    run(vz, nz);
    for (int f = 0; f < 6; f++) begin checks++; if (shade[f] != 4'd15) failures++; end
    // facing away: ambient only, 0.4 * 15 = 6
    nz = '{-1, -1, -1, -1, -0.5, -0.25};
    run(vz, nz);
    for (int f = 0; f < 6; f++) begin checks++; if (shade[f] != 4'd6) failures++; end
    // falling brightness with distance
    vz = '{100, 100, 100, 100, 200, 200, 200, 200};
    nz = '{1, 1, 0, 0, 0, 0};
    run(vz, nz);
    checks++;
    if (!(shade[0] > shade[1] && shade[1] >= 4'd6)) failures++;
    for (int i = 0; i < 60; i++) begin
      for (int k = 0; k < 8; k++) vz[k] = real'($urandom_range(20 * 64, 300 * 64)) / 64.0;
      for (int f = 0; f < 6; f++) nz[f] = real'($urandom_range(0, 128)) / 64.0 - 1.0;
      run(vz, nz);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
