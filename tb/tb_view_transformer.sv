// tb_view_transformer: checks rotation, translation, latency and throughput.
//
// With zero angles the output must be the input plus the offset, exactly.
// With random angles each output is compared with a floating-point
// reference T*Rz*Ry*Rx*v, within a tolerance that covers the table's and
// each stage's rounding. A vector enters every clock and its result must
// leave exactly four clocks later.
module tb_view_transformer;
  import mocap_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  fx_t ax = 0, ay = 0, az = 0, dx = 0, dy = 0, dz = 0;
  vec4_t v = '0, r;
  int checks = 0, failures = 0;
  real exq0 [$], exq1 [$], exq2 [$];
  int  tq [$];
  int  cyc = 0;
  bit  exact = 1;

  view_transformer dut (.clk, .rst, .ax, .ay, .az, .dx, .dy, .dz, .in_valid, .v, .out_valid, .r);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare results as they leave
  always @(posedge clk) begin
    #1;
    if (!rst && out_valid) begin
      real e [3];
      real got [3];
      real tol;
      int t0;
      checks++;
      if (exq0.size() == 0) failures++;
      else begin
        e[0] = exq0.pop_front(); e[1] = exq1.pop_front(); e[2] = exq2.pop_front();
        t0 = tq.pop_front();
        got[0] = real'(longint'(r.x)) / 64.0;
        got[1] = real'(longint'(r.y)) / 64.0;
        got[2] = real'(longint'(r.z)) / 64.0;
        tol = exact ? 0.0 : 0.5;
        if (cyc - t0 != 4) failures++;
        for (int k = 0; k < 3; k++)
          if (got[k] - e[k] > tol || e[k] - got[k] > tol) begin
            failures++;
            if (failures < 10) $display("elem %0d got %f exp %f", k, got[k], e[k]);
          end
      end
    end
  end

  task automatic send(input real x, y, z, input real a, b, c, input real tx, ty, tz);
    real p [3];
    real q [3];
    @(negedge clk);
    in_valid = 1;
    v.x = fx_t'(longint'(x * 64.0)); v.y = fx_t'(longint'(y * 64.0));
    v.z = fx_t'(longint'(z * 64.0)); v.w = FX_ONE;
    x = real'(longint'(x * 64.0)) / 64.0; y = real'(longint'(y * 64.0)) / 64.0;
    z = real'(longint'(z * 64.0)) / 64.0;
    // Rx
    p[0] = x; p[1] = $cos(a) * y - $sin(a) * z; p[2] = $sin(a) * y + $cos(a) * z;
    // Ry
    q[0] = $cos(b) * p[0] + $sin(b) * p[2]; q[1] = p[1]; q[2] = -$sin(b) * p[0] + $cos(b) * p[2];
    // Rz
    p[0] = $cos(c) * q[0] - $sin(c) * q[1]; p[1] = $sin(c) * q[0] + $cos(c) * q[1]; p[2] = q[2];
    p[0] += tx; p[1] += ty; p[2] += tz;
    exq0.push_back(p[0]); exq1.push_back(p[1]); exq2.push_back(p[2]);
    tq.push_back(cyc);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // identity rotation: exact translation
    dx = -18'sd128; dy = 18'sd128; dz = -18'sd256;          // (-2, 2, -4)
    for (int i = 0; i < 200; i++)
      send(real'($urandom_range(0, 2000)) / 64.0 - 15.0, real'($urandom_range(0, 2000)) / 64.0 - 15.0,
           real'($urandom_range(0, 2000)) / 64.0 - 15.0, 0, 0, 0, -2, 2, -4);
    @(negedge clk) in_valid = 0;
    repeat (6) @(negedge clk);
    exact = 0;
    for (int g = 0; g < 20; g++) begin
      real a, b, c, tx, ty, tz;
      // angles on the fixed-point grid
      ax = fx_t'($urandom_range(0, 400)) - 18'sd200;
      ay = fx_t'($urandom_range(0, 400)) - 18'sd200;
      az = fx_t'($urandom_range(0, 400)) - 18'sd200;
      dx = fx_t'($urandom_range(0, 512)) - 18'sd256;
      dy = fx_t'($urandom_range(0, 512)) - 18'sd256;
      dz = fx_t'($urandom_range(0, 512)) - 18'sd256;
      a = real'(longint'(ax)) / 64.0; b = real'(longint'(ay)) / 64.0; c = real'(longint'(az)) / 64.0;
      tx = real'(longint'(dx)) / 64.0; ty = real'(longint'(dy)) / 64.0; tz = real'(longint'(dz)) / 64.0;
      for (int i = 0; i < 20; i++)
        send(real'($urandom_range(0, 400)) / 64.0 - 3.0, real'($urandom_range(0, 400)) / 64.0 - 3.0,
             real'($urandom_range(0, 400)) / 64.0 - 3.0, a, b, c, tx, ty, tz);
      @(negedge clk) in_valid = 0;
      repeat (6) @(negedge clk);
    end
    checks++;
    if (exq0.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
