// tb_cross_hairs: checks the cross-hair overlay over a small scan.
//
// A 64x48 scan is run for several random centres; every pixel on the
// centre's row or column must carry the cross colour one clock later, every
// other pixel 0.
module tb_cross_hairs;
  logic clk = 0;
  logic [10:0] hc = 0, xc = 0;
  logic [9:0]  vc = 0, yc = 0;
  logic [17:0] col = 18'h3F000, pixel;
  int checks = 0, failures = 0, n_on = 0;

  cross_hairs dut (.clk, .hcount(hc), .vcount(vc), .x_coord(xc), .y_coord(yc),
                   .cross_color(col), .pixel);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 8; f++) begin
      xc = 11'($urandom_range(63)); yc = 10'($urandom_range(47)); col = 18'($urandom);
      for (int y = 0; y < 48; y++)
        for (int x = 0; x < 64; x++) begin
          logic [17:0] e;
          @(negedge clk) begin hc = 11'(x); vc = 10'(y); end
          e = (x == int'(xc) || y == int'(yc)) ? col : '0;
          @(posedge clk); #1;
          checks++;
          if (pixel !== e) failures++;
          if (e != 0) n_on++;
        end
    end
    checks++;
    if (n_on < 8 * 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
