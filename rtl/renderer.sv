// renderer: draws prisms into the ZBT frame buffer and displays them.
//
// For each prism (start) the six faces are drawn one after another by the
// polygon drawer, in the prism's colour and each face's own shade, with the
// vertex sets front v0-v3, back v4-v7, top v4 v5 v1 v0, bottom v7 v6 v2 v3,
// left v4 v0 v3 v7, right v1 v5 v6 v2. Screen vertices (fixed point) are
// truncated to integer pixels and depths. Pixels go through the memory
// converter (address, packing, off-screen filter) into the pixel buffer,
// which the memory controller drains into the ZBT with a depth test. The
// ZBT-to-VGA block reads the buffer once drawing is finished (all_drawn).
// A single frame buffer showing a static image, as the design settled on.
//
// Timing: 'done' pulses when the sixth face of a prism has left the drawer.
module renderer
  import mocap_pkg::*;
#(
  parameter int H_ACTIVE = 800,
  parameter int V_ACTIVE = 600
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  vec4_t       scr   [8],
  input  logic [3:0]  shade [6],
  input  logic [1:0]  color,
  input  logic        all_drawn,
  input  logic        draw_en,
  input  logic        redraw,
  output logic        busy,
  output logic        done,
  output logic        read_mode,
  // ZBT
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
  output logic [31:0] n_pixels,
  output logic [31:0] n_written,
  output logic [31:0] n_rejected,
  output logic [31:0] n_dropped,
  output logic [31:0] n_stall
);
  localparam logic [2:0] FACE [6][4] = '{
    '{3'd0, 3'd1, 3'd2, 3'd3}, '{3'd4, 3'd5, 3'd6, 3'd7}, '{3'd4, 3'd5, 3'd1, 3'd0},
    '{3'd7, 3'd6, 3'd2, 3'd3}, '{3'd4, 3'd0, 3'd3, 3'd7}, '{3'd1, 3'd5, 3'd6, 3'd2}
  };

  function automatic logic signed [11:0] to_pix(input fx_t a);
    int i;
    i = fx_int(a);
    if (i > 2047)  return 12'sd2047;
    if (i < -2048) return -12'sd2048;
    return 12'(i);
  endfunction

  typedef enum logic [1:0] {IDLE, GO, WAITF} st_t;
  st_t st;
  logic [2:0] f;
  logic pd_go, pd_busy, pd_done;
  logic signed [11:0] fx [4], fy [4], fz [4];

  always_comb
    for (int i = 0; i < 4; i++) begin
      fx[i] = to_pix(scr[FACE[f][i]].x);
      fy[i] = to_pix(scr[FACE[f][i]].y);
      fz[i] = to_pix(scr[FACE[f][i]].z);
    end

  // ---- drawer -> converter -> buffer -> controller ----
  logic               pv, pr;
  logic signed [11:0] pxx, pyy;
  logic [10:0]        pzz;
  logic [1:0]         pcol;
  logic [3:0]         psh;
  polygon_drawer u_pd (.clk, .rst, .start(pd_go), .vx(fx), .vy(fy), .vz(fz),
                     .color(color), .shade(shade[f]), .busy(pd_busy), .done(pd_done),
                     .pix_valid(pv), .pix_ready(pr), .pix_x(pxx), .pix_y(pyy), .pix_z(pzz),
                     .pix_color(pcol), .pix_shade(psh));

  logic        cv, cr, csel, cdrop;
  logic [18:0] caddr;
  pix_word_t   cword;
  memory_converter #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE)) mc (
    .in_valid(pv), .in_ready(pr), .x(pxx), .y(pyy), .z(pzz), .color(pcol), .shade(psh),
    .out_valid(cv), .out_ready(cr), .addr(caddr), .sel(csel), .word(cword), .dropped(cdrop));

  logic        bv, br, bfull;
  logic [37:0] bdata;
  pixel_buffer #(.WIDTH(38), .DEPTH(16)) pb (
    .clk, .rst, .in_valid(cv), .in_ready(cr), .in_data({caddr, csel, cword}),
    .out_valid(bv), .out_ready(br), .out_data(bdata), .full(bfull));

  logic [18:0] disp_addr;
  logic        vs_now;
  logic [10:0] hc_unused;
  logic [9:0]  vc_unused;
  memory_controller #(.H_WORDS(H_ACTIVE / 2), .V_ACTIVE(V_ACTIVE)) mctl (
    .clk, .rst, .vsync(vs_now), .draw_en, .redraw, .all_drawn(all_drawn && st == IDLE),
    .pix_valid(bv), .pix_ready(br), .pix_addr(bdata[37:19]), .pix_sel(bdata[18]),
    .pix_word(pix_word_t'(bdata[17:0])), .disp_addr, .read_mode,
    .zbt_addr, .zbt_we, .zbt_wdata, .zbt_rdata, .n_written, .n_rejected);

  zbt_to_vga #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE)) vga (
    .clk, .rst, .disp_addr, .rdata(zbt_rdata), .rgb(vga_rgb), .hsync(vga_hsync),
    .vsync(vga_vsync), .blank(vga_blank), .vsync_now(vs_now), .hcount(hc_unused), .vcount(vc_unused));

  assign busy = (st != IDLE) || pd_busy;

  always_ff @(posedge clk) begin
    pd_go <= 1'b0;
    done  <= 1'b0;
    if (rst) begin
      st        <= IDLE;
      f         <= '0;
      n_pixels  <= '0;
      n_dropped <= '0;
      n_stall   <= '0;
    end else begin
      if (pv && pr && !cdrop) n_pixels <= n_pixels + 1'b1;
      if (cdrop)              n_dropped <= n_dropped + 1'b1;
      if (bfull)              n_stall <= n_stall + 1'b1;
      unique case (st)
        IDLE: if (start) begin
          f  <= '0;
          st <= GO;
        end
        GO: begin
          pd_go <= 1'b1;
          st    <= WAITF;
        end
        WAITF: if (pd_done) begin
          if (f == 3'd5) begin
            done <= 1'b1;
            st   <= IDLE;
          end else begin
            f  <= f + 1'b1;
            st <= GO;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
