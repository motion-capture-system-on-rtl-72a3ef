// tb_center_of_mass: checks the per-frame centre and the four-frame average.
//
// Each simulated frame marks its start (scan at 0,0), presents a random
// number of matching pixels (sometimes at most the 100-pixel threshold, so
// the frame's centre must be 0), then the divide row. The expected centre
// (integer sum/count, or 0) enters a reference four-entry history whose mean
// must appear on x_coord/y_coord no later than 26 clocks after the divide
// row, with exactly one 'updated' strobe.
module tb_center_of_mass;
  logic clk = 0, rst = 1;
  logic m = 0;
  logic [10:0] px = 0, hc = 11'd5;
  logic [9:0]  py = 0, vc = 10'd5;
  logic [10:0] xc;
  logic [9:0]  yc;
  logic upd;
  int checks = 0, failures = 0;
  int hx [4], hy [4];
  int n_hidden = 0;

  center_of_mass dut (.clk, .rst, .match(m), .px, .py, .hcount(hc), .vcount(vc),
                      .x_coord(xc), .y_coord(yc), .updated(upd));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin hx[i] = 0; hy[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 30; f++) begin
      int n, sx, sy, cx, cy, ups, lat, ex, ey;
      n  = ($urandom_range(3) == 0) ? $urandom_range(0, 100) : $urandom_range(101, 600);
      sx = 0; sy = 0;
      @(negedge clk) begin hc = 0; vc = 0; end            // frame start
      @(negedge clk) begin hc = 11'd5; vc = 10'd5; end
      for (int k = 0; k < n; k++) begin
        int gx, gy;
        gx = $urandom_range(81, 716);
        gy = $urandom_range(109, 541);
        m = 1; px = 11'(gx); py = 10'(gy);
        sx += gx; sy += gy;
        @(negedge clk);
        m = ($urandom_range(3) == 0);  // some non-matching pixels in between
        if (m) begin m = 0; @(negedge clk); end
      end
      m = 0;
      cx = (n > 100) ? sx / n : 0;
      cy = (n > 100) ? sy / n : 0;
      if (n <= 100) n_hidden++;
      hx[f % 4] = cx; hy[f % 4] = cy;
      ex = (hx[0] + hx[1] + hx[2] + hx[3]) / 4;
      ey = (hy[0] + hy[1] + hy[2] + hy[3]) / 4;
      hc = 0; vc = 10'd543;                                // divide row
      @(negedge clk) hc = 11'd1;
      ups = 0; lat = -1;
      for (int t = 1; t <= 60; t++) begin
        @(posedge clk); #1;
        if (upd) begin ups++; lat = t; end
      end
      checks++;
      if (ups != 1 || lat > 27) begin
        failures++;
        $display("frame %0d: updated %0d times, latency %0d", f, ups, lat);
      end
      checks++;
      if (int'(xc) != ex || int'(yc) != ey) begin
        failures++;
        $display("frame %0d n=%0d: got (%0d,%0d) exp (%0d,%0d)", f, n, xc, yc, ex, ey);
      end
    end
    checks++;
    if (n_hidden == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
