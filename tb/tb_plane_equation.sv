// tb_plane_equation: checks the plane through three points.
//
// For random integer points, (a, b, c) must equal the cross product of the
// edges (p1 - p0) x (p2 - p0), worked out here, and all three points must
// satisfy a*x + b*y + c*z = d.
module tb_plane_equation;
  logic signed [11:0] x0, y0, z0, x1, y1, z1, x2, y2, z2;
  logic signed [31:0] a, b, c;
  logic signed [47:0] d;
  int checks = 0, failures = 0;

  plane_equation dut (.x0, .y0, .z0, .x1, .y1, .z1, .x2, .y2, .z2, .a, .b, .c, .d);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the design's example polygon, at depth 10
    x0 = 50; y0 = 50; z0 = 10; x1 = 200; y1 = 50; z1 = 10; x2 = 250; y2 = 100; z2 = 10;
    #1;
    checks++;
    if (a != 0 || b != 0 || c != 150 * 50 || d != 150 * 50 * 10) failures++;
    for (int i = 0; i < 3000; i++) begin
      longint ux, uy, uz, vx, vy, vz, ea, eb, ec;
      x0 = 12'($urandom_range(0, 4095)) - 12'sd2048; y0 = 12'($urandom_range(0, 4095)) - 12'sd2048;
      z0 = 12'($urandom_range(0, 2047));
      x1 = 12'($urandom_range(0, 1000)); y1 = 12'($urandom_range(0, 1000)); z1 = 12'($urandom_range(0, 2047));
      x2 = 12'($urandom_range(0, 1000)); y2 = 12'($urandom_range(0, 1000)); z2 = 12'($urandom_range(0, 2047));
      #1;
      ux = x1 - x0; uy = y1 - y0; uz = z1 - z0;
      vx = x2 - x0; vy = y2 - y0; vz = z2 - z0;
      ea = uy * vz - uz * vy; eb = uz * vx - ux * vz; ec = ux * vy - uy * vx;
      checks++;
      if (longint'(a) != ea || longint'(b) != eb || longint'(c) != ec) failures++;
      checks++;
      if (longint'(a) * x0 + longint'(b) * y0 + longint'(c) * z0 != longint'(d) ||
          longint'(a) * x1 + longint'(b) * y1 + longint'(c) * z1 != longint'(d) ||
          longint'(a) * x2 + longint'(b) * y2 + longint'(c) * z2 != longint'(d)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
