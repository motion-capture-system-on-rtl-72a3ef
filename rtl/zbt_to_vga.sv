// zbt_to_vga: shows the frame buffer on the VGA monitor.
//
// The display timing counts pixels; at every even column x of a visible row
// the word holding pixels x and x+1 is requested from the frame buffer (one
// memory read every other pixel, as in the design). The word returns two
// clocks later and is held while its two pixels are shown. Each 18-bit half
// is turned into colour by a look-up: the base colour (red, yellow, green,
// blue by colour index) with each lit 8-bit channel set to shade*17, so
// shade 0 is black and 15 full brightness. The syncs and blank are delayed to
// match. The look-up contents are this design's choice.
//
// Timing: rgb, hsync, vsync and blank are four clocks behind the internal
// counters; hcount/vcount outputs are the undelayed counters.
module zbt_to_vga
  import mocap_pkg::*;
#(
  parameter int H_ACTIVE = 800,
  parameter int V_ACTIVE = 600
) (
  input  logic        clk,
  input  logic        rst,
  output logic [18:0] disp_addr,
  input  logic [35:0] rdata,
  output logic [23:0] rgb,
  output logic        hsync,
  output logic        vsync,
  output logic        blank,
  output logic        vsync_now,
  output logic [10:0] hcount,
  output logic [9:0]  vcount
);
  logic hs0, vs0, bl0;
  vga_timing #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE)) tim (
    .clk, .rst, .hcount, .vcount, .hsync(hs0), .vsync(vs0), .blank(bl0));

  assign vsync_now = vs0;
  assign disp_addr = {vcount, hcount[9:1]};

  logic [3:0] hs_d, vs_d, bl_d;
  logic [10:0] h_d [3];
  logic [35:0] word_r;
  pix_word_t   px;
  logic [7:0]  lvl;

  always_ff @(posedge clk) begin
    if (rst) begin
      hs_d <= '0; vs_d <= '0; bl_d <= '1;
      for (int i = 0; i < 3; i++) h_d[i] <= '0;
      word_r <= '0;
      rgb    <= '0;
    end else begin
      hs_d   <= {hs_d[2:0], hs0};
      vs_d   <= {vs_d[2:0], vs0};
      bl_d   <= {bl_d[2:0], bl0};
      h_d[0] <= hcount;
      h_d[1] <= h_d[0];
      h_d[2] <= h_d[1];
      // data for the pair requested two clocks ago arrives now
      if (h_d[1][0] == 1'b0) word_r <= rdata;
      if (bl_d[2]) rgb <= '0;
      else begin
        unique case (color_t'(px.color))
          RED:     rgb <= {lvl, 8'd0, 8'd0};
          YELLOW:  rgb <= {lvl, lvl, 8'd0};
          GREEN:   rgb <= {8'd0, lvl, 8'd0};
          default: rgb <= {8'd0, 8'd0, lvl};
        endcase
      end
    end
  end

  always_comb begin
    px  = h_d[2][0] ? pix_word_t'(word_r[35:18]) : pix_word_t'(word_r[17:0]);
    lvl = 8'(px.shade) * 8'd17;
  end

  assign hsync = hs_d[3];
  assign vsync = vs_d[3];
  assign blank = bl_d[3];
endmodule
