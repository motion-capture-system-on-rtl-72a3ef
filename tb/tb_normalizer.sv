// tb_normalizer: checks the divide-by-w stage and its queue.
//
// Bursts of homogeneous vectors are offered on in_valid whenever the testbench
// likes, respecting in_ready. Every vector must come out, in order, as
// (x/w, y/w, z/w, 1) with each element sign * floor(|e| * 64 / |w|); the
// queue must fill (in_ready low) at least once.
module tb_normalizer;
  import mocap_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, in_ready, out_valid;
  vec4_t v = '0, r;
  int checks = 0, failures = 0, n_full = 0, n_sent = 0, n_got = 0;
  longint exq0 [$], exq1 [$], exq2 [$];

  normalizer dut (.clk, .rst, .in_valid, .v, .in_ready, .out_valid, .r);

  always #5 clk = ~clk;

  function automatic longint ediv(input longint n, input longint d);
    longint q;
    q = ((n < 0 ? -n : n) * 64) / (d < 0 ? -d : d);
    if ((n < 0) != (d < 0)) q = -q;
    if (q > 131071) q = 131071;
    if (q < -131072) q = -131072;
    return q;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (!rst && out_valid) begin
      longint e [3];
      n_got++;
      checks++;
      if (exq0.size() == 0) failures++;
      else begin
        e[0] = exq0.pop_front(); e[1] = exq1.pop_front(); e[2] = exq2.pop_front();
        if (longint'(r.x) != e[0] || longint'(r.y) != e[1] || longint'(r.z) != e[2] || longint'(r.w) != 64) begin
          failures++;
          if (failures < 10) $display("got %0d %0d %0d exp %0d %0d %0d", longint'(r.x), longint'(r.y), longint'(r.z), e[0], e[1], e[2]);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int b = 0; b < 6; b++) begin
      for (int i = 0; i < 14; i++) begin
        longint x, y, z, w;
        longint e [3];
        x = longint'($urandom_range(0, 20000)) - 10000;
        y = longint'($urandom_range(0, 20000)) - 10000;
        z = longint'($urandom_range(0, 20000)) - 10000;
        w = longint'($urandom_range(1, 640));
        if (i % 3 == 0) w = -w;
        @(negedge clk);
        v.x = fx_t'(x); v.y = fx_t'(y); v.z = fx_t'(z); v.w = fx_t'(w);
        in_valid = 1;
        while (!in_ready) begin n_full++; @(negedge clk); end
        e[0] = ediv(x, w); e[1] = ediv(y, w); e[2] = ediv(z, w);
        exq0.push_back(e[0]); exq1.push_back(e[1]); exq2.push_back(e[2]);
        n_sent++;
        @(posedge clk);
      end
      @(negedge clk) in_valid = 0;
      repeat ($urandom_range(0, 900)) @(negedge clk);
    end
    while (n_got < n_sent) @(negedge clk);
    checks++;
    if (n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
