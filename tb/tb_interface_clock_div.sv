// tb_interface_clock_div: checks the divided link clock and its rise strobe.
//
// With the 8-bit counter the interface clock must hold each level for
// exactly 256 system clocks (period 512), and 'rise' must be high in exactly
// the first system cycle of every high phase.
module tb_interface_clock_div;
  logic clk = 0, rst = 1;
  logic if_clk, rise, prev;
  int checks = 0, failures = 0;
  int last_toggle, n_rise;

  interface_clock_div dut (.clk, .rst, .if_clk, .rise);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(posedge clk); #1;
    prev = if_clk;
    last_toggle = -1;
    n_rise = 0;
    for (int t = 0; t < 6000; t++) begin
      @(posedge clk); #1;
      checks++;
      if (rise !== (if_clk && !prev)) begin
        failures++;
        $display("t=%0d rise=%b if_clk=%b prev=%b", t, rise, if_clk, prev);
      end
      if (rise) n_rise++;
      if (if_clk != prev) begin
        if (last_toggle >= 0) begin
          checks++;
          if (t - last_toggle != 256) begin
            failures++;
            $display("half period %0d", t - last_toggle);
          end
        end
        last_toggle = t;
      end
      prev = if_clk;
    end
    checks++;
    if (n_rise < 10 || n_rise > 12) begin failures++; $display("rises %0d", n_rise); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
