// tb_matrix_mult: checks the registered 4x4 matrix times vector product.
//
// Random matrices and vectors, a new pair every clock, are multiplied here
// with 64-bit integers (each row sum shifted right by 6 and clamped) and
// must appear one clock later with out_valid, giving throughput 1.
module tb_matrix_mult;
  import mocap_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  mat4_t m = '0;
  vec4_t v = '0, r;
  int checks = 0, failures = 0;

  matrix_mult dut (.clk, .rst, .in_valid, .m, .v, .out_valid, .r);

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
    for (int i = 0; i < 2000; i++) begin
      longint e [4];
      longint vin [4];
      longint mm [4][4];
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      for (int a = 0; a < 4; a++)
        for (int b = 0; b < 4; b++) begin
          longint mv;
          mv = (i % 4 == 0) ? longint'($urandom_range(0, 262143)) - 131072
                            : longint'($urandom_range(0, 512)) - 256;
          mm[a][b] = mv;
          m[a][b] = fx_t'(mv);
        end
      for (int b = 0; b < 3; b++) vin[b] = longint'($urandom_range(0, 8192)) - 4096;
      vin[3] = 64;
      v.x = fx_t'(vin[0]); v.y = fx_t'(vin[1]); v.z = fx_t'(vin[2]); v.w = fx_t'(vin[3]);
      for (int a = 0; a < 4; a++) begin
        longint s;
        s = 0;
        for (int b = 0; b < 4; b++) s += mm[a][b] * vin[b];
        e[a] = clamp(s >>> 6);
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid) failures++;
      if (in_valid) checks++;
      if (in_valid && (longint'(r.x) != e[0] || longint'(r.y) != e[1] || longint'(r.z) != e[2] || longint'(r.w) != e[3])) begin
        failures++;
        if (failures < 10) $display("i=%0d got (%0d %0d %0d %0d) exp (%0d %0d %0d %0d)", i, longint'(r.x), longint'(r.y), longint'(r.z), longint'(r.w), e[0], e[1], e[2], e[3]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
