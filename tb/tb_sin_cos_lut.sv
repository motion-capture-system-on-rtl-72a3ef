// tb_sin_cos_lut: checks the sine and cosine table over several turns.
//
// Angles from -3*pi to +3*pi in every fixed-point step are applied; both
// outputs must be within 3/64 of the real sine and cosine of the angle.
module tb_sin_cos_lut;
  import mocap_pkg::*;
  fx_t angle = 0, s, c;
  int checks = 0, failures = 0;
  real worst = 0.0;

  sin_cos_lut dut (.angle, .sin_o(s), .cos_o(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -603; a <= 603; a++) begin
      real ar, es, ec, ds, dc;
      angle = fx_t'(a);
      #1;
      ar = real'(a) / 64.0;
      es = $sin(ar);
      ec = $cos(ar);
      ds = real'(s) / 64.0 - es;
      dc = real'(c) / 64.0 - ec;
      if (ds < 0) ds = -ds;
      if (dc < 0) dc = -dc;
      if (ds > worst) worst = ds;
      if (dc > worst) worst = dc;
      checks++;
      if (ds > 3.0 / 64.0 || dc > 3.0 / 64.0) begin
        failures++;
        if (failures < 10) $display("angle %0d: sin %0d cos %0d (exp %f %f)", a, s, c, es, ec);
      end
    end
    $display("worst error %f", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
