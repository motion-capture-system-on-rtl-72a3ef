// tb_viewport_transformer: checks the mapping onto the 800x600 screen.
//
// The centre of normalised space must land on pixel (400, 300); one unit
// right, up and half a unit deep must give (425, 275) and depth 25; random
// vectors must equal (25x + 400, 300 - 25y, 50z) in fixed point, one clock
// after the input.
module tb_viewport_transformer;
  import mocap_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  vec4_t v = '0, r;
  int checks = 0, failures = 0;

  viewport_transformer dut (.clk, .rst, .in_valid, .v, .out_valid, .r);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input longint x, y, z, input longint ex, ey, ez);
    @(negedge clk);
    in_valid = 1;
    v.x = fx_t'(x); v.y = fx_t'(y); v.z = fx_t'(z); v.w = FX_ONE;
    @(posedge clk); #1;
    checks++;
    if (!out_valid || longint'(r.x) != ex || longint'(r.y) != ey || longint'(r.z) != ez ||
        longint'(r.w) != 64) begin
      failures++;
      if (failures < 10) $display("(%0d,%0d,%0d) -> %0d %0d %0d exp %0d %0d %0d", x, y, z,
        longint'(r.x), longint'(r.y), longint'(r.z), ex, ey, ez);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    apply(0, 0, 0, 400 * 64, 300 * 64, 0);
    apply(64, 64, 32, 425 * 64, 275 * 64, 25 * 64);
    apply(-16 * 64, 12 * 64, 64, 0, 0, 50 * 64);
    for (int i = 0; i < 1000; i++) begin
      longint x, y, z;
      x = longint'($urandom_range(0, 2000)) - 1000;
      y = longint'($urandom_range(0, 1500)) - 750;
      z = longint'($urandom_range(0, 1000)) - 500;
      apply(x, y, z, (1600 * x + 25600 * 64) >>> 6, (-1600 * y + 19200 * 64) >>> 6, (3200 * z) >>> 6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
