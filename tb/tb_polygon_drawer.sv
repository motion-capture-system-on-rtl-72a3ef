// tb_polygon_drawer: checks polygon fill, depth and the pixel handshake.
//
// The example rhombus (50,50) (200,50) (250,100) (100,100) and random convex
// quadrilaterals with sloped depth planes are drawn. Checks: every pixel lies
// inside the polygon (within one pixel of an edge, the drawer excludes the
// boundary), no pixel is emitted twice, the pixel count lies between the area less the perimeter and the area,
// depth is within 2 of the plane through vertices 0, 1, 2, colour and shade
// are passed on. Each polygon is drawn a second time with random pix_ready
// back-pressure and must give the same pixels. An edge-on polygon (all
// vertices on a line) must draw nothing.
module tb_polygon_drawer;
  logic clk = 0, rst = 1, start = 0, busy, done, pix_valid, pix_ready = 1;
  logic signed [11:0] vx [4], vy [4], vz [4];
  logic [1:0] color = 0;
  logic [3:0] shade = 0;
  logic signed [11:0] pix_x, pix_y;
  logic [10:0] pix_z;
  logic [1:0] pix_color;
  logic [3:0] pix_shade;
  int checks = 0, failures = 0;
  int seen [int];
  int n_pix, bad_in, bad_z, bad_dup, bad_cs, n_stalls = 0;
  bit rand_ready = 0;

  polygon_drawer dut (.clk, .rst, .start, .vx, .vy, .vz, .color, .shade, .busy, .done, .pix_valid,
                      .pix_ready, .pix_x, .pix_y, .pix_z, .pix_color, .pix_shade);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // signed distance of (x, y) from edge i, positive inside for either winding
  function automatic real edge_dist(input int i, input real x, input real y, input real orient);
    real ax, ay, bx, by, cr, len;
    ax = vx[i]; ay = vy[i]; bx = vx[(i + 1) % 4]; by = vy[(i + 1) % 4];
    len = $sqrt((bx - ax) ** 2 + (by - ay) ** 2);
    if (len == 0) return 1e9;
    cr = (bx - ax) * (y - ay) - (by - ay) * (x - ax);
    return orient * cr / len;
  endfunction

  always @(posedge clk) begin
    if (!rst) begin
      if (pix_valid && !pix_ready) n_stalls++;
      if (pix_valid && pix_ready) begin
        int key;
        real orient, area2, px0, py0, pz0, ux, uy, uz, wx, wy, wz, a, b, c, ze;
        key = int'(pix_x) * 4096 + int'(pix_y);
        n_pix++;
        if (seen.exists(key)) bad_dup++;
        seen[key] = int'(pix_z);
        area2 = 0;
        for (int i = 0; i < 4; i++) area2 += real'(vx[i]) * vy[(i + 1) % 4] - real'(vx[(i + 1) % 4]) * vy[i];
        orient = area2 > 0 ? 1.0 : -1.0;
        for (int i = 0; i < 4; i++) if (edge_dist(i, pix_x, pix_y, orient) < -1.0) begin bad_in++; break; end
        px0 = vx[0]; py0 = vy[0]; pz0 = vz[0];
        ux = vx[1] - px0; uy = vy[1] - py0; uz = vz[1] - pz0;
        wx = vx[2] - px0; wy = vy[2] - py0; wz = vz[2] - pz0;
        a = uy * wz - uz * wy; b = uz * wx - ux * wz; c = ux * wy - uy * wx;
        ze = pz0 - (a * (real'(pix_x) - px0) + b * (real'(pix_y) - py0)) / c;
        if (ze > 2047) ze = 2047;
        if (real'(pix_z) - ze > 2.0 || ze - real'(pix_z) > 2.0) bad_z++;
        if (pix_color != color || pix_shade != shade) bad_cs++;
      end
    end
  end

  task automatic draw(output int cnt);
    int lat;
    seen.delete();
    n_pix = 0; bad_in = 0; bad_z = 0; bad_dup = 0; bad_cs = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 0;
    while (!done && lat < 400000) begin
      @(negedge clk);
      pix_ready = rand_ready ? 1'($urandom) : 1'b1;
      lat++;
    end
    pix_ready = 1;
    cnt = n_pix;
    checks++;
    if (lat >= 400000) failures++;
  endtask

  task automatic draw_and_check(input real area);
    int c1, c2;
    int first [int];
    rand_ready = 0;
    draw(c1);
    first = seen;
    checks += 4;
    if (bad_in != 0) begin failures++; $display("%0d pixels outside", bad_in); end
    if (bad_z != 0) begin failures++; $display("%0d pixels with wrong depth", bad_z); end
    if (bad_dup != 0) begin failures++; $display("%0d duplicates", bad_dup); end
    if (bad_cs != 0) failures++;
    checks++;
    if (real'(c1) > area + 1.0 || real'(c1) < area - perimeter()) begin
      failures++;
      $display("pixel count %0d for area %f: (%0d,%0d) (%0d,%0d) (%0d,%0d) (%0d,%0d)", c1, area, vx[0], vy[0], vx[1], vy[1], vx[2], vy[2], vx[3], vy[3]);
    end
    rand_ready = 1;
    draw(c2);
    checks++;
    if (c2 != c1 || seen != first) begin failures++; $display("back-pressure changed the result"); end
  endtask

  function automatic real perimeter();
    real s = 0;
    for (int i = 0; i < 4; i++) s += $sqrt((real'(vx[i]) - vx[(i + 1) % 4]) ** 2 + (real'(vy[i]) - vy[(i + 1) % 4]) ** 2);
    return s;
  endfunction

  function automatic real quad_area();
    real s = 0;
    for (int i = 0; i < 4; i++) s += real'(vx[i]) * vy[(i + 1) % 4] - real'(vx[(i + 1) % 4]) * vy[i];
    return (s < 0 ? -s : s) / 2.0;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // the example rhombus, flat at depth 100
    vx = '{50, 200, 250, 100}; vy = '{50, 50, 100, 100}; vz = '{100, 100, 100, 100};
    color = 2; shade = 9;
    draw_and_check(quad_area());
    // sloped depth
    vz = '{100, 250, 300, 150};
    draw_and_check(quad_area());
    for (int i = 0; i < 30; i++) begin
      real cx, cy, r, ang [4], t;
      cx = $urandom_range(0, 800); cy = $urandom_range(0, 600); r = $urandom_range(10, 120);
      for (int k = 0; k < 4; k++) ang[k] = real'($urandom_range(0, 6283)) / 1000.0;
      for (int k = 0; k < 4; k++)
        for (int m = k + 1; m < 4; m++) if (ang[m] < ang[k]) begin t = ang[k]; ang[k] = ang[m]; ang[m] = t; end
      for (int k = 0; k < 4; k++) begin
        vx[k] = 12'(int'(cx + r * $cos(ang[k])));
        vy[k] = 12'(int'(cy + r * $sin(ang[k])));
      end
      // depths on a plane, vertex order reversed sometimes
      for (int k = 0; k < 4; k++) vz[k] = 12'(500 + int'((real'(vx[k]) - cx) * 0.7 - (real'(vy[k]) - cy) * 1.3));
      if (i % 2) begin
        logic signed [11:0] tx, ty, tz;
        tx = vx[1]; vx[1] = vx[3]; vx[3] = tx;
        ty = vy[1]; vy[1] = vy[3]; vy[3] = ty;
        tz = vz[1]; vz[1] = vz[3]; vz[3] = tz;
      end
      color = 2'($urandom); shade = 4'($urandom);
      if (quad_area() > 20) draw_and_check(quad_area());
    end
    // edge-on polygon
    begin
      int c;
      vx = '{10, 20, 30, 40}; vy = '{10, 20, 30, 40}; vz = '{5, 6, 7, 8};
      rand_ready = 0;
      draw(c);
      checks++;
      if (c != 0) failures++;
    end
    checks++;
    if (n_stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
