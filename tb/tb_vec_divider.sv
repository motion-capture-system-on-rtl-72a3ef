// tb_vec_divider: checks the element-wise vector divide and the divide by w.
//
// Half the cases divide by a separate scalar, half by the vector's own w
// (homogeneous normalisation). Each element must equal
// sign * floor(|e| * 64 / |d|), clamped, the result's w must be 1.0, and
// 'done' must come 27 clocks after 'start'.
module tb_vec_divider;
  import mocap_pkg::*;
  logic clk = 0, rst = 1, start = 0, by_w = 0;
  vec4_t v = '0, q;
  fx_t den = 0;
  logic busy, done;
  int checks = 0, failures = 0;

  vec_divider dut (.clk, .rst, .start, .v, .den, .by_w, .busy, .done, .q);

  always #5 clk = ~clk;

  function automatic longint ediv(input longint n, input longint d);
    longint r;
    if (d == 0) return (n < 0) ? -131072 : 131071;
    r = ((n < 0 ? -n : n) * 64) / (d < 0 ? -d : d);
    if ((n < 0) != (d < 0)) r = -r;
    if (r > 131071) r = 131071;
    if (r < -131072) r = -131072;
    return r;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 300; i++) begin
      int lat;
      longint d;
      v.x = fx_t'($urandom_range(0, 20000)) - 18'sd10000;
      v.y = fx_t'($urandom_range(0, 20000)) - 18'sd10000;
      v.z = fx_t'($urandom_range(0, 20000)) - 18'sd10000;
      v.w = fx_t'($urandom_range(1, 1000)) - 18'sd300;
      den = fx_t'($urandom_range(1, 1000)) - 18'sd500;
      by_w = 1'($urandom);
      d = by_w ? longint'(v.w) : longint'(den);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      v = '0; den = '0;             // captured at start
      lat = 0;
      while (!done && lat < 200) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 27) begin failures++; $display("latency %0d", lat); end
      checks++;
      if (longint'(q.w) != 64) failures++;
      @(negedge clk);
    end
    // exact values with a known divisor
    begin
      int lat;
      v.x = 18'sd640; v.y = -18'sd320; v.z = 18'sd96; v.w = 18'sd128;  // (10, -5, 1.5) / 2
      by_w = 1; den = '0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      lat = 0;
      while (!done && lat < 200) begin @(negedge clk); lat++; end
      checks++;
      if (q.x != 18'sd320 || q.y != -18'sd160 || q.z != 18'sd48) failures++;
    end
    // random values with checked elements
    for (int i = 0; i < 300; i++) begin
      vec4_t vv;
      fx_t dd;
      logic bw;
      int lat;
      longint d;
      vv.x = fx_t'($urandom); vv.y = fx_t'($urandom); vv.z = fx_t'($urandom);
      vv.w = fx_t'($urandom_range(0, 600)) - 18'sd300;
      dd = fx_t'($urandom_range(0, 4000)) - 18'sd2000;
      bw = 1'($urandom);
      d = bw ? longint'(vv.w) : longint'(dd);
      v = vv; den = dd; by_w = bw;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      lat = 0;
      while (!done && lat < 200) begin @(negedge clk); lat++; end
      checks++;
      if (longint'(q.x) != ediv(vv.x, d) || longint'(q.y) != ediv(vv.y, d) ||
          longint'(q.z) != ediv(vv.z, d)) begin
        failures++;
        if (failures < 10) $display("(%0d,%0d,%0d)/%0d got (%0d,%0d,%0d)", longint'(vv.x), longint'(vv.y), longint'(vv.z), d, longint'(q.x), longint'(q.y), longint'(q.z));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
