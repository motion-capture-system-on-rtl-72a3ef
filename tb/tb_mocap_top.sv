// tb_mocap_top: end-to-end run of the whole capture and display system.
//
// Two synthetic cameras see four 16x16 coloured arm bands (red, yellow,
// green, blue) on a dark background; each camera's HSV pixel is produced
// from the scan position the design puts out. The run, at the design's full
// size, goes through eleven camera frames:
//  * after five frames every joint must be {front x, side x, side y} of its
//    band's centre, sent over the serial link, and the two bones must be
//    red-green and yellow-blue;
//  * the cross-hair overlay must mark the front camera's red centre, and
//    with show_detect the overlay must show exactly the blue band's pixels
//    in blue;
//  * 'render' then draws both bones as prisms into the ZBT model; the memory
//    must clear, accept pixels after a vertical sync, and switch to read
//    mode; the displayed frame must light exactly the stored non-black
//    pixels;
//  * the blue band is then hidden from the side camera for four frames, after
//    which blue must be flagged hidden and its last non-zero position kept.
// Each mechanism is counted (serial records, frame pulses, hidden points,
// drawn pixels, depth rejections, off-screen drops, buffer stalls, clear and
// read phases) and one that never happened counts as a failure.
module tb_mocap_top;
  import mocap_pkg::*;
  localparam int FRAME = 1056 * 628;
  // band top-left corners: [camera][colour] = {x, y}; colour order R, Y, G, B
  localparam int BX [2][4] = '{'{100, 500, 200, 600}, '{150, 500, 300, 650}};
  localparam int BY [2][4] = '{'{250, 250, 300, 300}, '{250, 250, 300, 300}};
  localparam logic [7:0] HH [4] = '{8'hFD, 8'd3, 8'd80, 8'hB0};
  localparam logic [7:0] SS [4] = '{8'hFF, 8'h10, 8'h10, 8'h10};
  localparam logic [7:0] VV [4] = '{8'hFF, 8'hFF, 8'd200, 8'h10};

  logic clk = 0, rst = 1;
  logic [7:0] cam1_h, cam1_s, cam1_v, cam2_h, cam2_s, cam2_v;
  logic [10:0] cam1_hcount, cam2_hcount;
  logic [9:0]  cam1_vcount, cam2_vcount;
  logic [5:0]  link;
  xyz_t  joint [4];
  logic [3:0] hidden;
  bone_t bone [2];
  logic [1:0] found;
  logic [17:0] debug_pixel;
  logic show_detect = 0;
  logic render = 0, draw_en = 1, render_busy, read_mode;
  fx_t view_ax = 0, view_ay = 0, view_az = 0, view_dx = 0, view_dy = 0, view_dz = 18'sd1280;  // dz = 20
  logic [18:0] zbt_addr;
  logic zbt_we;
  logic [35:0] zbt_wdata, zbt_rdata;
  logic [23:0] vga_rgb;
  logic vga_hsync, vga_vsync, vga_blank;
  logic [31:0] n_records, n_pixels, n_written, n_rejected, n_dropped, n_stall;
  bit hide_blue = 0;
  int checks = 0, failures = 0;
  int n_detect_px = 0, n_detect_bad = 0;
  int n_frame_pulses = 0, n_hidden_events = 0, n_read_entries = 0, n_clear_entries = 0, n_cross = 0;
  logic link_fr_d = 0, rm_d = 0;
  logic [3:0] hid_d = 0;

  mocap_top dut (.*);
  zbt_sram_model zbt (.clk, .addr(zbt_addr), .we(zbt_we), .wdata(zbt_wdata), .rdata(zbt_rdata));

  always #5 clk = ~clk;

  // camera scenes
  function automatic logic [23:0] scene(input int cam, input int x, input int y);
    for (int c = 0; c < 4; c++) begin
      if (cam == 0 && c == 3 && hide_blue) continue;
      if (x >= BX[cam][c] && x < BX[cam][c] + 16 && y >= BY[cam][c] && y < BY[cam][c] + 16)
        return {HH[c], SS[c], VV[c]};
    end
    return {8'h40, 8'h00, 8'h00};
  endfunction

  always_comb begin
    {cam1_h, cam1_s, cam1_v} = scene(0, int'(cam1_hcount), int'(cam1_vcount));
    {cam2_h, cam2_s, cam2_v} = scene(1, int'(cam2_hcount), int'(cam2_vcount));
  end

  // mechanism counters
  always @(posedge clk) begin
    if (!rst) begin
      if (link[2] && !link_fr_d) n_frame_pulses++;
      for (int i = 0; i < 4; i++) if (hidden[i] && !hid_d[i]) n_hidden_events++;
      if (read_mode && !rm_d) n_read_entries++;
      if (!read_mode && rm_d) n_clear_entries++;
      if (!show_detect && debug_pixel == 18'h3F000 && int'(cam2_hcount) == BX[1][0] + 7 + 1) n_cross++;
      // detection view: away from blue's own cross-hair lines, the pixel one
      // clock back is a blue band pixel exactly when the overlay shows blue
      if (show_detect && cam2_vcount > 150 && cam2_vcount < 500 &&
          int'(cam2_hcount) - 1 != BX[1][3] + 7 && int'(cam2_vcount) != BY[1][3] + 7) begin
        automatic int hx = int'(cam2_hcount) - 1;
        automatic bit is_blue = hx >= BX[1][3] && hx < BX[1][3] + 16 &&
                                int'(cam2_vcount) >= BY[1][3] && int'(cam2_vcount) < BY[1][3] + 16;
        if (is_blue) n_detect_px++;
        if (is_blue != (debug_pixel == 18'h0003F)) n_detect_bad++;
      end
    end
    link_fr_d <= link[2];
    rm_d      <= read_mode;
    hid_d     <= hidden;
  end

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xyz_t blue_before;
    int lit_exp, lit_got;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // five frames to fill the four-frame averages and pass them over the link
    repeat (5 * FRAME + 20000) @(negedge clk);
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (int'(joint[c].x) != BX[1][c] + 7 || int'(joint[c].y) != BX[0][c] + 7 ||
          int'(joint[c].z) != BY[0][c] + 7 || joint[c].color != 2'(c) || hidden[c]) begin
        failures++;
        $display("joint %0d: (%0d,%0d,%0d) colour %0d hidden %b", c, joint[c].x, joint[c].y, joint[c].z,
                 joint[c].color, hidden[c]);
      end
    end
    checks++;
    if (found != 2'b11 || bone[0].a.color != 2'd0 || bone[0].b.color != 2'd2 ||
        bone[1].a.color != 2'd1 || bone[1].b.color != 2'd3) failures++;
    checks++;
    if (n_records < 16) begin failures++; $display("records %0d", n_records); end
    // draw the skeleton
    @(negedge clk) render = 1;
    @(negedge clk) render = 0;
    while (!read_mode) @(negedge clk);
    $display("drawn: pixels %0d written %0d rejected %0d dropped %0d stall cycles %0d",
             n_pixels, n_written, n_rejected, n_dropped, n_stall);
    checks++;
    if (n_written + n_rejected != n_pixels) failures++;
    // the displayed frame shows what was stored
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
    // one frame of the detection view
    show_detect = 1;
    repeat (FRAME) @(negedge clk);
    show_detect = 0;
    checks++;
    if (n_detect_px != 15 * 15 || n_detect_bad != 0) begin  // 16x16 less its cross-hair row and column
      failures++;
      $display("detect view: %0d blue pixels, %0d mismatches", n_detect_px, n_detect_bad);
    end
    // hide blue from the side camera for four frames
    while (!(cam1_hcount == 0 && cam1_vcount == 0)) @(negedge clk);
    hide_blue = 1;
    repeat (4 * FRAME + 20000) @(negedge clk);
    checks++;
    // the average decays over the hidden frames; the last non-zero one (a
    // quarter of the centre) is what stays
    blue_before = joint[3];
    blue_before.y = 10'((BX[0][3] + 7) / 4);
    blue_before.z = 10'((BY[0][3] + 7) / 4);
    if (!hidden[3] || joint[3] != blue_before || hidden[2:0] != 3'b000) begin
      failures++;
      $display("hidden %b blue (%0d,%0d,%0d)", hidden, joint[3].x, joint[3].y, joint[3].z);
    end
    // mechanisms
    $display("mechanisms: records %0d frame pulses %0d hidden %0d pixels %0d rejected %0d dropped %0d stalls %0d read %0d cross %0d",
             n_records, n_frame_pulses, n_hidden_events, n_pixels, n_rejected, n_dropped, n_stall,
             n_read_entries, n_cross);
    checks++; if (n_records == 0) failures++;
    checks++; if (n_frame_pulses == 0) failures++;
    checks++; if (n_hidden_events == 0) failures++;
    checks++; if (n_pixels == 0) failures++;
    checks++; if (n_rejected == 0) failures++;
    checks++; if (n_dropped == 0) failures++;
    checks++; if (n_stall == 0) failures++;
    checks++; if (n_read_entries == 0) failures++;
    checks++; if (n_cross == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
