// mocap_top: two-camera arm motion capture with a 3D prism display.
//
// Two FPGAs are modelled side by side and joined by their six-wire link.
// FPGA 1 handles the side camera: four colour matchers (red, yellow, green,
// blue arm bands) feed four centre-of-mass units, and each colour's centre is
// sent over the link, one serial data wire per colour, with a shared
// interface clock and frame wire. FPGA 2 handles the front camera the same
// way, receives the side camera's centres, combines both views into one 3D
// point per colour (holding the last point while a band is hidden), pairs the
// points into two bones (red-green, yellow-blue) and, on 'render', draws each
// bone as a shaded prism into the ZBT frame buffer, which is then shown on
// the VGA output. Cross hairs over the front camera's centres form a debug
// overlay pixel; with show_detect (a switch in the design) every pixel
// matched as a band colour is shown in that colour instead.
//
// The camera decoders and the RGB-to-HSV converters are outside this
// module: each camera's HSV pixel arrives on cam*_h/s/v for the scan
// position this module puts out on cam*_hcount/vcount (800x600 SVGA scan,
// 1056x628 totals). The ZBT memory is outside as well.
//
// Link wires (link[5:0]): 0 red data, 1 interface clock, 2 frame, 3 yellow,
// 4 green, 5 blue, as in the design. The render sequence (prism of bone 0,
// then bone 1, only for bones whose two joints were found) and the port
// choices are this design's own.
//
// Timing: one clock (40 MHz in the design). A centre is available about
// 30 clocks after row 543 of a camera frame; a serial record takes
// 23 x 512 clocks; rendering takes a frame-buffer clear (240,000 clocks)
// plus a few clocks per drawn pixel.
module mocap_top
  import mocap_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // side camera (FPGA 1) HSV stream
  input  logic [7:0]  cam1_h,
  input  logic [7:0]  cam1_s,
  input  logic [7:0]  cam1_v,
  output logic [10:0] cam1_hcount,
  output logic [9:0]  cam1_vcount,
  // front camera (FPGA 2) HSV stream
  input  logic [7:0]  cam2_h,
  input  logic [7:0]  cam2_s,
  input  logic [7:0]  cam2_v,
  output logic [10:0] cam2_hcount,
  output logic [9:0]  cam2_vcount,
  // board-to-board link, as driven by FPGA 1
  output logic [5:0]  link,
  // skeleton
  output xyz_t        joint  [4],
  output logic [3:0]  hidden,
  output bone_t       bone   [2],
  output logic [1:0]  found,
  output logic [17:0] debug_pixel,
  input  logic        show_detect,
  // graphics control
  input  logic        render,
  input  logic        draw_en,
  input  fx_t         view_ax, view_ay, view_az,
  input  fx_t         view_dx, view_dy, view_dz,
  output logic        render_busy,
  output logic        read_mode,
  // ZBT frame buffer
  output logic [18:0] zbt_addr,
  output logic        zbt_we,
  output logic [35:0] zbt_wdata,
  input  logic [35:0] zbt_rdata,
  // VGA
  output logic [23:0] vga_rgb,
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic        vga_blank,
  // statistics
  output logic [31:0] n_records,
  output logic [31:0] n_pixels,
  output logic [31:0] n_written,
  output logic [31:0] n_rejected,
  output logic [31:0] n_dropped,
  output logic [31:0] n_stall
);
  localparam logic [7:0] HMAX [4] = '{8'd1,  8'd5, 8'd89, 8'hBA};
  localparam logic [7:0] HMIN [4] = '{8'hFA, 8'd0, 8'd73, 8'hA3};
  localparam logic [7:0] SMIN [4] = '{8'hF5, 8'd0, 8'd0,  8'd0};
  localparam logic [7:0] VMIN [4] = '{8'hB6, 8'hFA, 8'd160, 8'd2};
  localparam bit         WRAP [4] = '{1'b1, 1'b0, 1'b0, 1'b0};
  localparam logic [17:0] CROSS [4] = '{18'h3F000, 18'h3FFC0, 18'h00FC0, 18'h0003F};

  // ================= FPGA 1: side camera =================
  logic hs1, vs1, bl1;
  vga_timing scan1 (.clk, .rst, .hcount(cam1_hcount), .vcount(cam1_vcount),
                    .hsync(hs1), .vsync(vs1), .blank(bl1));

  logic        if_clk, if_rise, frame1;
  logic [10:0] c1x [4];
  logic [9:0]  c1y [4];
  logic [3:0]  fr_out, sending;
  logic [3:0]  ser_data;

  interface_clock_div ifdiv (.clk, .rst, .if_clk, .rise(if_rise));
  assign frame1 = (cam1_hcount == '0) && (cam1_vcount == '0);

  for (genvar i = 0; i < 4; i++) begin : g_cam1
    logic        m;
    logic [10:0] mx;
    logic [9:0]  my;
    logic        upd;
    point_detect #(.HUE_MAX(HMAX[i]), .HUE_MIN(HMIN[i]), .SAT_MIN(SMIN[i]),
                   .VAL_MIN(VMIN[i]), .HUE_WRAP(WRAP[i])) pdet (
      .clk, .rst, .h(cam1_h), .s(cam1_s), .v(cam1_v), .hcount(cam1_hcount),
      .vcount(cam1_vcount), .match(m), .x_out(mx), .y_out(my));
    center_of_mass com (.clk, .rst, .match(m), .px(mx), .py(my), .hcount(cam1_hcount),
                        .vcount(cam1_vcount), .x_coord(c1x[i]), .y_coord(c1y[i]), .updated(upd));
    serial_sender snd (.clk, .rst, .tick(if_rise), .frame(frame1), .color_index(2'(i)),
                       .x_coord(c1x[i]), .y_coord(c1y[i]), .data(ser_data[i]),
                       .frame_out(fr_out[i]), .sending(sending[i]));
  end

  assign link = {ser_data[3], ser_data[2], ser_data[1], fr_out[0], if_clk, ser_data[0]};

  // ================= FPGA 2: front camera =================
  logic hs2, vs2, bl2;
  vga_timing scan2 (.clk, .rst, .hcount(cam2_hcount), .vcount(cam2_vcount),
                    .hsync(hs2), .vsync(vs2), .blank(bl2));

  logic [10:0] c2x [4];
  logic [9:0]  c2y [4];
  logic [1:0]  rx_col [4];
  logic [10:0] rx_x [4];
  logic [9:0]  rx_y [4];
  logic [3:0]  rx_valid;
  logic [17:0] cross_px [4];
  logic [3:0]  rx_wire;
  logic [3:0]  match2;
  assign rx_wire = {link[5], link[4], link[3], link[0]};

  for (genvar i = 0; i < 4; i++) begin : g_cam2
    logic        m;
    logic [10:0] mx;
    logic [9:0]  my;
    logic        upd;
    point_detect #(.HUE_MAX(HMAX[i]), .HUE_MIN(HMIN[i]), .SAT_MIN(SMIN[i]),
                   .VAL_MIN(VMIN[i]), .HUE_WRAP(WRAP[i])) pdet (
      .clk, .rst, .h(cam2_h), .s(cam2_s), .v(cam2_v), .hcount(cam2_hcount),
      .vcount(cam2_vcount), .match(m), .x_out(mx), .y_out(my));
    assign match2[i] = m;
    center_of_mass com (.clk, .rst, .match(m), .px(mx), .py(my), .hcount(cam2_hcount),
                        .vcount(cam2_vcount), .x_coord(c2x[i]), .y_coord(c2y[i]), .updated(upd));
    serial_receiver rcv (.clk, .rst, .if_clk(link[1]), .frame(link[2]), .data(rx_wire[i]),
                         .color_index(rx_col[i]), .x_coord(rx_x[i]), .y_coord(rx_y[i]),
                         .valid(rx_valid[i]));
    coord3d_gen c3d (.clk, .rst, .x_cam2(c2x[i]), .z_cam2(c2y[i]), .y_cam1(rx_x[i]),
                     .z_cam1(rx_y[i]), .color_index(rx_col[i]), .xyz(joint[i]), .hidden(hidden[i]));
    cross_hairs xh (.clk, .hcount(cam2_hcount), .vcount(cam2_vcount), .x_coord(c2x[i]),
                    .y_coord(c2y[i]), .cross_color(CROSS[i]), .pixel(cross_px[i]));
  end

  // debug overlay: cross hairs, or with show_detect every matched pixel in
  // its band's colour (yellow, red, blue, green take precedence in that order)
  always_comb begin
    debug_pixel = cross_px[0] | cross_px[1] | cross_px[2] | cross_px[3];
    if (show_detect) begin
      if      (match2[YELLOW]) debug_pixel = CROSS[YELLOW];
      else if (match2[RED])    debug_pixel = CROSS[RED];
      else if (match2[BLUE])   debug_pixel = CROSS[BLUE];
      else if (match2[GREEN])  debug_pixel = CROSS[GREEN];
    end
  end

  skeleton_gen skel (.clk, .rst, .joint, .bone, .found);

  always_ff @(posedge clk)
    if (rst) n_records <= '0;
    else     n_records <= n_records + 32'($countones(rx_valid));

  // ================= graphics =================
  typedef enum logic [2:0] {G_IDLE, G_MODEL, G_MWAIT, G_DRAW, G_DWAIT, G_NEXT} gst_t;
  gst_t       gst;
  logic       gb;           // bone being drawn
  bone_t      bone_l [2];   // bones latched at 'render'
  logic [1:0] found_l;
  logic       mg_start, mg_busy, mg_done;
  vec4_t      scr [8];
  logic [3:0] shade [6];
  logic       r_start, r_busy, r_done, all_drawn;

  model_generator mgen (.clk, .rst, .start(mg_start), .bone(bone_l[gb]),
                        .ax(view_ax), .ay(view_ay), .az(view_az),
                        .dx(view_dx), .dy(view_dy), .dz(view_dz),
                        .busy(mg_busy), .done(mg_done), .scr, .shade);

  renderer rend (.clk, .rst, .start(r_start), .scr, .shade, .color(bone_l[gb].a.color),
                 .all_drawn, .draw_en, .redraw(render && gst == G_IDLE), .busy(r_busy),
                 .done(r_done), .read_mode, .zbt_addr, .zbt_we, .zbt_wdata, .zbt_rdata,
                 .vga_rgb, .vga_hsync, .vga_vsync, .vga_blank,
                 .n_pixels, .n_written, .n_rejected, .n_dropped, .n_stall);

  assign render_busy = (gst != G_IDLE) || mg_busy || r_busy;

  always_ff @(posedge clk) begin
    mg_start <= 1'b0;
    r_start  <= 1'b0;
    if (rst) begin
      gst       <= G_IDLE;
      gb        <= 1'b0;
      all_drawn <= 1'b0;
      found_l   <= '0;
      bone_l    <= '{default: '0};
    end else begin
      unique case (gst)
        G_IDLE: if (render) begin
          bone_l    <= bone;
          found_l   <= found;
          gb        <= 1'b0;
          all_drawn <= 1'b0;
          gst       <= G_NEXT;
        end
        G_NEXT: gst <= found_l[gb] ? G_MODEL : G_DWAIT;
        G_MODEL: begin
          mg_start <= 1'b1;
          gst      <= G_MWAIT;
        end
        G_MWAIT: if (mg_done) begin
          r_start <= 1'b1;
          gst     <= G_DRAW;
        end
        G_DRAW: if (r_done) gst <= G_DWAIT;
        G_DWAIT: begin
          if (gb) begin
            all_drawn <= 1'b1;
            gst       <= G_IDLE;
          end else begin
            gb  <= 1'b1;
            gst <= G_NEXT;
          end
        end
        default: gst <= G_IDLE;
      endcase
    end
  end

  // all four senders share the frame timing
  assert property (@(posedge clk) disable iff (rst) fr_out == '0 || fr_out == '1);
endmodule
