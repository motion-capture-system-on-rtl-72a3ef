// tb_renderer: draws two prisms into the frame buffer and checks the image.
//
// Prism 1 is a box whose front face (300..500, 200..400) lies at depth 100 and
// whose back face, shifted by (+50, -50), lies at depth 200; each face has its
// own shade. Prism 2 reaches past the right screen edge. After both are drawn
// and all_drawn is raised the controller must be in read mode. Then, for
// random screen points away from face edges, the stored pixel must be the
// nearest covering face (worked out here from the face planes) in the
// prism's colour and that face's shade, and uncovered points must hold the
// cleared value. Depth rejections, off-screen drops and buffer stalls must
// all have happened, every accepted pixel must have been either written or
// rejected, and one displayed frame must light exactly the stored pixels
// whose shade is not zero.
module tb_renderer;
  import mocap_pkg::*;
  localparam int FACE [6][4] = '{'{0, 1, 2, 3}, '{4, 5, 6, 7}, '{4, 5, 1, 0},
                                 '{7, 6, 2, 3}, '{4, 0, 3, 7}, '{1, 5, 6, 2}};
  logic clk = 0, rst = 1, start = 0, all_drawn = 0, draw_en = 1, redraw = 0;
  vec4_t scr [8];
  logic [3:0] shade [6];
  logic [1:0] color = 0;
  logic busy, done, read_mode, zbt_we, vga_hsync, vga_vsync, vga_blank;
  logic [18:0] zbt_addr;
  logic [35:0] zbt_wdata, zbt_rdata;
  logic [23:0] vga_rgb;
  logic [31:0] n_pixels, n_written, n_rejected, n_dropped, n_stall;
  int checks = 0, failures = 0;
  int P [2][8][3];

  renderer dut (.clk, .rst, .start, .scr, .shade, .color, .all_drawn, .draw_en, .redraw, .busy, .done,
                .read_mode, .zbt_addr, .zbt_we, .zbt_wdata, .zbt_rdata, .vga_rgb, .vga_hsync,
                .vga_vsync, .vga_blank, .n_pixels, .n_written, .n_rejected, .n_dropped, .n_stall);
  zbt_sram_model zbt (.clk, .addr(zbt_addr), .we(zbt_we), .wdata(zbt_wdata), .rdata(zbt_rdata));

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // distance of (x, y) inside face f of prism p (negative: outside), in pixels
  function automatic real face_margin(input int p, input int f, input real x, input real y);
    real area2, best;
    area2 = 0;
    for (int k = 0; k < 4; k++) begin
      int a, b;
      a = FACE[f][k]; b = FACE[f][(k + 1) % 4];
      area2 += real'(P[p][a][0]) * P[p][b][1] - real'(P[p][b][0]) * P[p][a][1];
    end
    if (area2 == 0) return -1e9;
    best = 1e9;
    for (int k = 0; k < 4; k++) begin
      int a, b;
      real ax, ay, bx, by, l, d;
      a = FACE[f][k]; b = FACE[f][(k + 1) % 4];
      ax = P[p][a][0]; ay = P[p][a][1]; bx = P[p][b][0]; by = P[p][b][1];
      l = $sqrt((bx - ax) ** 2 + (by - ay) ** 2);
      d = (area2 > 0 ? 1.0 : -1.0) * ((bx - ax) * (y - ay) - (by - ay) * (x - ax)) / l;
      if (d < best) best = d;
    end
    return best;
  endfunction

  function automatic real face_z(input int p, input int f, input real x, input real y);
    real ux, uy, uz, wx, wy, wz, a, b, c;
    int i0, i1, i2;
    i0 = FACE[f][0]; i1 = FACE[f][1]; i2 = FACE[f][2];
    ux = P[p][i1][0] - P[p][i0][0]; uy = P[p][i1][1] - P[p][i0][1]; uz = P[p][i1][2] - P[p][i0][2];
    wx = P[p][i2][0] - P[p][i0][0]; wy = P[p][i2][1] - P[p][i0][1]; wz = P[p][i2][2] - P[p][i0][2];
    a = uy * wz - uz * wy; b = uz * wx - ux * wz; c = ux * wy - uy * wx;
    return P[p][i0][2] - (a * (x - P[p][i0][0]) + b * (y - P[p][i0][1])) / c;
  endfunction

  task automatic draw(input int p, input logic [1:0] col);
    for (int i = 0; i < 8; i++) scr[i] = vec_make(fx_t'(P[p][i][0] * 64), fx_t'(P[p][i][1] * 64), fx_t'(P[p][i][2] * 64));
    for (int f = 0; f < 6; f++) shade[f] = 4'(f + 2 + 7 * p);
    color = col;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    int lit_exp, lit_got, n_pts;
    P[0] = '{'{300, 200, 100}, '{500, 200, 100}, '{500, 400, 100}, '{300, 400, 100},
             '{350, 150, 200}, '{550, 150, 200}, '{550, 350, 200}, '{350, 350, 200}};
    P[1] = '{'{700, 450, 150}, '{850, 450, 150}, '{850, 550, 150}, '{700, 550, 150},
             '{720, 430, 300}, '{870, 430, 300}, '{870, 530, 300}, '{720, 530, 300}};
    for (int i = 0; i < 8; i++) scr[i] = '0;
    for (int f = 0; f < 6; f++) shade[f] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    draw(0, 2'd2);
    draw(1, 2'd1);
    all_drawn = 1;
    while (!read_mode) @(negedge clk);
    checks++;
    if (n_rejected == 0 || n_dropped == 0 || n_stall == 0 || n_written + n_rejected != n_pixels) begin
      failures++;
      $display("pixels %0d written %0d rejected %0d dropped %0d stall %0d", n_pixels, n_written, n_rejected, n_dropped, n_stall);
    end
    // image
    n_pts = 0;
    while (n_pts < 3000) begin
      int x, y, best_p, best_f;
      real bz, margin;
      logic [17:0] w, e;
      bit amb;
      x = $urandom_range(250, 799); y = $urandom_range(100, 599);
      best_p = -1; best_f = -1; bz = 1e9; amb = 0;
      for (int p = 0; p < 2; p++)
        for (int f = 0; f < 6; f++) begin
          margin = face_margin(p, f, x, y);
          if (margin > -2.0 && margin < 2.0) amb = 1;
          if (margin >= 2.0) begin
            real z;
            z = face_z(p, f, x, y);
            if (z < bz - 2.0) begin bz = z; best_p = p; best_f = f; end
            else if (z < bz + 2.0) amb = 1;
          end
        end
      if (!amb) begin
        n_pts++;
        w = (x % 2) ? zbt.mem[y * 512 + x / 2][35:18] : zbt.mem[y * 512 + x / 2][17:0];
        checks++;
        if (best_p < 0) e = 18'h007FF;
        else e = {1'b0, (best_p == 0) ? 2'd2 : 2'd1, 4'(best_f + 2 + 7 * best_p), 11'd0};
        if (best_p < 0 ? (w !== e) : (w[17:11] !== e[17:11] || real'(w[10:0]) - bz > 3.0 || bz - real'(w[10:0]) > 3.0)) begin
          failures++;
          if (failures < 10) $display("(%0d,%0d) stored %h expected %h depth %f", x, y, w, e, bz);
        end
      end
    end
    // one displayed frame
    lit_exp = 0;
    for (int y = 0; y < 600; y++)
      for (int x = 0; x < 800; x++) begin
        logic [17:0] w;
        w = (x % 2) ? zbt.mem[y * 512 + x / 2][35:18] : zbt.mem[y * 512 + x / 2][17:0];
        if (w[14:11] != 0) lit_exp++;
      end
    while (!vga_vsync) @(negedge clk);
    while (vga_vsync) @(negedge clk);
    lit_got = 0;
    while (!vga_vsync) begin
      @(negedge clk);
      if (vga_rgb != 0) lit_got++;
    end
    checks++;
    if (lit_got != lit_exp || lit_exp == 0) begin failures++; $display("lit %0d expected %0d", lit_got, lit_exp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
