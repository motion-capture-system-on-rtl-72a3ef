// coord3d_gen: 3D point of one colour from the two camera views.
//
// Camera #2 (front) gives this colour's horizontal position x; camera #1
// (side, received over the serial link) gives the horizontal position y and
// the height z. The three form the record {x, y, z, colour}. A centre of 0
// means too few pixels were seen, i.e. the band is hidden from a camera; then
// the last complete point is kept and 'hidden' is raised. Taking z from the
// linked camera and keeping the whole previous point follow the design; the
// front camera's height z_cam2 is therefore not used.
//
// Timing: registered, updated every clock.
module coord3d_gen
  import mocap_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [10:0] x_cam2,
  input  logic [9:0]  z_cam2,
  input  logic [10:0] y_cam1,
  input  logic [9:0]  z_cam1,
  input  logic [1:0]  color_index,
  output xyz_t        xyz,
  output logic        hidden
);
  always_ff @(posedge clk) begin
    if (rst) begin
      xyz    <= '0;
      hidden <= 1'b0;
    end else if (x_cam2 == '0 || y_cam1 == '0 || z_cam1 == '0) begin
      hidden <= 1'b1;
    end else begin
      xyz.x     <= x_cam2;
      xyz.y     <= y_cam1;
      xyz.z     <= z_cam1;
      xyz.color <= color_index;
      hidden    <= 1'b0;
    end
  end

  logic unused_ok;
  assign unused_ok = ^z_cam2;
endmodule
