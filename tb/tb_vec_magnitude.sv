// tb_vec_magnitude: checks the vector length and its latency.
//
// The expected length is the integer square root (found here by bisection)
// of x^2 + y^2 + z^2 taken on the raw fixed-point numbers, clamped to the
// largest 18-bit value; 'done' must come 20 clocks after 'start'.
module tb_vec_magnitude;
  import mocap_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  vec4_t v = '0;
  fx_t mag;
  logic busy, done;
  int checks = 0, failures = 0;

  vec_magnitude dut (.clk, .rst, .start, .v, .busy, .done, .mag);

  always #5 clk = ~clk;

  function automatic longint isqrt(input longint s);
    longint lo = 0, hi = 1 << 32;
    while (lo < hi) begin
      longint mid = (lo + hi + 1) / 2;
      if (mid * mid <= s) lo = mid; else hi = mid - 1;
    end
    return lo;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 500; i++) begin
      int lat;
      longint s, e;
      if (i % 3 == 0) begin
        v.x = fx_t'($urandom); v.y = fx_t'($urandom); v.z = fx_t'($urandom);
      end else begin
        v.x = fx_t'($urandom_range(0, 2000)) - 18'sd1000;
        v.y = fx_t'($urandom_range(0, 2000)) - 18'sd1000;
        v.z = fx_t'($urandom_range(0, 2000)) - 18'sd1000;
      end
      v.w = fx_t'($urandom);
      s = longint'(v.x) * v.x + longint'(v.y) * v.y + longint'(v.z) * v.z;
      e = isqrt(s);
      if (e > 131071) e = 131071;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      lat = 0;
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      checks++;
      if (longint'(mag) != e || lat != 20) begin
        failures++;
        if (failures < 10) $display("|(%0d,%0d,%0d)| got %0d exp %0d latency %0d", v.x, v.y, v.z, mag, e, lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
