// plane_equation: plane A*x + B*y + C*z = D through three vertices.
//
// The normal (A, B, C) is the cross product of the edges p1 - p0 and p2 - p0
// and D = A*x0 + B*y0 + C*z0, all in exact integer arithmetic on pixel
// coordinates and integer depths. The design derives the plane by inverting
// the matrix of the three points with D = 1; the cross product gives the same
// plane without a divider and without an ill-conditioned inverse, which is
// this design's choice. C = 0 means the polygon is seen edge-on.
//
// Timing: combinational.
module plane_equation (
  input  logic signed [11:0] x0, y0, z0,
  input  logic signed [11:0] x1, y1, z1,
  input  logic signed [11:0] x2, y2, z2,
  output logic signed [31:0] a, b, c,
  output logic signed [47:0] d
);
  logic signed [12:0] ux, uy, uz, vx, vy, vz;
  always_comb begin
    ux = 13'(x1) - 13'(x0);  uy = 13'(y1) - 13'(y0);  uz = 13'(z1) - 13'(z0);
    vx = 13'(x2) - 13'(x0);  vy = 13'(y2) - 13'(y0);  vz = 13'(z2) - 13'(z0);
    a  = 32'(uy) * 32'(vz) - 32'(uz) * 32'(vy);
    b  = 32'(uz) * 32'(vx) - 32'(ux) * 32'(vz);
    c  = 32'(ux) * 32'(vy) - 32'(uy) * 32'(vx);
    d  = 48'(a) * 48'(x0) + 48'(b) * 48'(y0) + 48'(c) * 48'(z0);
  end
endmodule
