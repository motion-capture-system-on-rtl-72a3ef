// tb_projection_transformer: checks the perspective matrix product.
//
// With the default matrix the outputs must be x*E, y*(E/A), Q33*z + Q34*w
// and w' = z, each product shifted right by 6 and clamped, one clock after
// the input, one vector per clock.
module tb_projection_transformer;
  import mocap_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  vec4_t v = '0, r;
  int checks = 0, failures = 0;

  projection_transformer dut (.clk, .rst, .in_valid, .v, .out_valid, .r);

  always #5 clk = ~clk;

  function automatic longint clamp(input longint a);
    if (a > 131071) return 131071;
    if (a < -131072) return -131072;
    return a;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 1000; i++) begin
      longint x, y, z, w, e [4];
      x = longint'($urandom_range(0, 4000)) - 2000;
      y = longint'($urandom_range(0, 4000)) - 2000;
      z = longint'($urandom_range(0, 4000)) - 2000;
      w = (i % 2) ? 64 : longint'($urandom_range(0, 200)) - 100;
      e[0] = clamp((213 * x) >>> 6);
      e[1] = clamp((284 * y) >>> 6);
      e[2] = clamp((67 * z - 13 * w) >>> 6);
      e[3] = clamp((64 * z) >>> 6);
      @(negedge clk);
      in_valid = 1;
      v.x = fx_t'(x); v.y = fx_t'(y); v.z = fx_t'(z); v.w = fx_t'(w);
      @(posedge clk); #1;
      checks++;
      if (!out_valid || longint'(r.x) != e[0] || longint'(r.y) != e[1] ||
          longint'(r.z) != e[2] || longint'(r.w) != e[3]) begin
        failures++;
        if (failures < 10) $display("i=%0d got %0d %0d %0d %0d exp %0d %0d %0d %0d", i,
          longint'(r.x), longint'(r.y), longint'(r.z), longint'(r.w), e[0], e[1], e[2], e[3]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
