// tb_coord3d_gen: checks the 3D point and the hidden-point hold.
//
// Random camera coordinates are applied, with a zero in one of the used
// coordinates about a third of the time. A complete triple must appear as
// {x from the front camera, y and z from the side camera, colour} one clock
// later; a triple with a zero must leave the previous point in place and
// raise 'hidden'.
module tb_coord3d_gen;
  import mocap_pkg::*;
  logic clk = 0, rst = 1;
  logic [10:0] xc2 = 0, yc1 = 0;
  logic [9:0]  zc2 = 0, zc1 = 0;
  logic [1:0]  ci = 0;
  xyz_t xyz, expv;
  logic hidden;
  int checks = 0, failures = 0, n_hidden = 0;

  coord3d_gen dut (.clk, .rst, .x_cam2(xc2), .z_cam2(zc2), .y_cam1(yc1), .z_cam1(zc1),
                   .color_index(ci), .xyz, .hidden);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic hid;
    int sel;
    expv = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      xc2 = 11'($urandom_range(1, 2047));
      yc1 = 11'($urandom_range(1, 2047));
      zc1 = 10'($urandom_range(1, 1023));
      zc2 = 10'($urandom);
      ci  = 2'($urandom);
      sel = $urandom_range(8);
      case (sel)
        0: xc2 = '0;
        1: yc1 = '0;
        2: zc1 = '0;
        default: ;
      endcase
      hid = (xc2 == 0) || (yc1 == 0) || (zc1 == 0);
      if (!hid) begin
        expv.x = xc2; expv.y = yc1; expv.z = zc1; expv.color = ci;
      end else n_hidden++;
      @(posedge clk); #1;
      checks++;
      if (xyz !== expv || hidden !== hid) begin
        failures++;
        if (failures < 10) $display("i=%0d got %p hid %b exp %p hid %b", i, xyz, hidden, expv, hid);
      end
    end
    checks++;
    if (n_hidden == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
