// tb_fx_divider: checks the signed fixed-point divider and its latency.
//
// Random numerators and denominators (including small, negative, zero and
// overflowing cases) are divided; the expected quotient is
// sign * floor(|num| * 64 / |den|), clamped to the 18-bit range, and a zero
// denominator gives the clamp value with the numerator's sign. 'done' must
// come exactly 25 clocks after 'start'.
module tb_fx_divider;
  import mocap_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  fx_t num = 0, den = 0, quot;
  logic busy, done;
  int checks = 0, failures = 0;

  fx_divider dut (.clk, .rst, .start, .num, .den, .busy, .done, .quot);

  always #5 clk = ~clk;

  function automatic longint expect_q(input longint n, input longint d);
    longint q;
    if (d == 0) return (n < 0) ? -131072 : 131071;
    q = ((n < 0 ? -n : n) * 64) / (d < 0 ? -d : d);
    if ((n < 0) != (d < 0)) q = -q;
    if (q > 131071) q = 131071;
    if (q < -131072) q = -131072;
    return q;
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
    for (int i = 0; i < 600; i++) begin
      int lat, sel;
      longint e;
      sel = $urandom_range(5);
      num = fx_t'($urandom);
      case (sel)
        0: den = '0;
        1: den = fx_t'($urandom_range(1, 8));
        2: den = -fx_t'($urandom_range(1, 300));
        default: den = fx_t'($urandom);
      endcase
      e = expect_q(longint'(num), longint'(den));
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      lat = 0;
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      checks++;
      if (longint'(quot) != e || lat != 25) begin
        failures++;
        if (failures < 10) $display("%0d / %0d: got %0d exp %0d latency %0d", num, den, quot, e, lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
