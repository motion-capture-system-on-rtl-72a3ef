// point_detect: colour matcher for one arm band.
//
// Each pixel's hue, saturation and value are compared with this instance's
// limits; the pixel matches when it lies strictly inside the hue window,
// above the saturation and value minimums, and strictly inside the fixed
// detection window of the frame. Red hue wraps around the top of the 8-bit
// hue range, so with HUE_WRAP=1 the hue test becomes h > HUE_MIN or
// h < HUE_MAX. The limits, the window and the wrap-around test follow the
// design; four instances (red, yellow, green, blue) run per camera.
//
// Timing: one register stage. 'match', 'x_out' and 'y_out' appear one clock
// after h/s/v/hcount/vcount and stay aligned with each other.
module point_detect #(
  parameter logic [7:0]  HUE_MAX    = 8'd1,    // red defaults
  parameter logic [7:0]  HUE_MIN    = 8'hFA,
  parameter logic [7:0]  SAT_MIN    = 8'hF5,
  parameter logic [7:0]  VAL_MIN    = 8'hB6,
  parameter bit          HUE_WRAP   = 1'b1,
  parameter logic [9:0]  WIN_TOP    = 10'd108,
  parameter logic [9:0]  WIN_BOTTOM = 10'd542,
  parameter logic [10:0] WIN_LEFT   = 11'd80,
  parameter logic [10:0] WIN_RIGHT  = 11'd717
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  h,
  input  logic [7:0]  s,
  input  logic [7:0]  v,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic        match,
  output logic [10:0] x_out,
  output logic [9:0]  y_out
);
  logic in_window, hue_ok, hit;

  always_comb begin
    in_window = (hcount > WIN_LEFT) && (hcount < WIN_RIGHT) &&
                (vcount > WIN_TOP)  && (vcount < WIN_BOTTOM);
    if (HUE_WRAP) hue_ok = (h > HUE_MIN) || (h < HUE_MAX);
    else          hue_ok = (h > HUE_MIN) && (h < HUE_MAX);
    hit = in_window && hue_ok && (s > SAT_MIN) && (v > VAL_MIN);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      match <= 1'b0;
      x_out <= '0;
      y_out <= '0;
    end else begin
      match <= hit;
      x_out <= hcount;
      y_out <= vcount;
    end
  end
endmodule
