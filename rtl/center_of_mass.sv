// center_of_mass: centre of one colour's matching pixels, smoothed.
//
// During a frame every matching pixel adds its column and row to two
// accumulators and increments a pixel count; all three clear at the frame
// start (hcount = vcount = 0). When the scan reaches row DIV_ROW (just below
// the detection window) two sequential dividers form sum/count for each axis;
// if MIN_COUNT pixels or fewer matched, the frame's centre is 0, which later
// stages treat as "hidden". Each new centre enters a four-entry history and the
// outputs are the mean of the history (sum shifted right by two). Accumulate,
// threshold, divide and four-frame average follow the design; the divider
// structure and the moment the history is written are this design's choices.
//
// Timing: the new average is visible 26 clocks after row DIV_ROW column 0
// (25-cycle divider plus the history register) and holds for the rest of the frame.
module center_of_mass #(
  parameter int          MIN_COUNT = 100,
  parameter logic [9:0]  DIV_ROW   = 10'd543
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        match,     // pixel at (px, py) matched
  input  logic [10:0] px,
  input  logic [9:0]  py,
  input  logic [10:0] hcount,    // current scan position (frame control)
  input  logic [9:0]  vcount,
  output logic [10:0] x_coord,
  output logic [9:0]  y_coord,
  output logic        updated    // one-cycle strobe when a new centre entered the history
);
  localparam int AW = 25;
  logic [AW-1:0] x_acc, y_acc, count;
  logic          div_start, x_done, y_done, x_busy, y_busy;
  logic [AW-1:0] x_quot, y_quot, x_rem_unused, y_rem_unused;
  logic [AW-1:0] dividend_x, dividend_y, divisor;
  logic [10:0]   x_hist [4];
  logic [9:0]    y_hist [4];
  logic [1:0]    idx;
  logic [12:0]   x_sum;
  logic [11:0]   y_sum;

  wire frame_start = (hcount == 11'd0) && (vcount == 10'd0);
  assign div_start = (hcount == 11'd0) && (vcount == DIV_ROW);

  always_ff @(posedge clk) begin
    if (rst || frame_start) begin
      x_acc <= '0;
      y_acc <= '0;
      count <= '0;
    end else if (match) begin
      x_acc <= x_acc + AW'(px);
      y_acc <= y_acc + AW'(py);
      count <= count + 1'b1;
    end
  end

  // too few pixels: divide 0 by something, giving a centre of 0
  always_comb begin
    dividend_x = (count > AW'(MIN_COUNT)) ? x_acc : '0;
    dividend_y = (count > AW'(MIN_COUNT)) ? y_acc : '0;
    divisor    = (count == '0) ? AW'(1) : count;
  end

  udiv_seq #(.NW(AW), .DW(AW)) x_div (
    .clk, .rst, .start(div_start), .num(dividend_x), .den(divisor),
    .busy(x_busy), .done(x_done), .quot(x_quot), .rem(x_rem_unused));
  udiv_seq #(.NW(AW), .DW(AW)) y_div (
    .clk, .rst, .start(div_start), .num(dividend_y), .den(divisor),
    .busy(y_busy), .done(y_done), .quot(y_quot), .rem(y_rem_unused));

  always_ff @(posedge clk) begin
    updated <= 1'b0;
    if (rst) begin
      idx <= '0;
      for (int i = 0; i < 4; i++) begin
        x_hist[i] <= '0;
        y_hist[i] <= '0;
      end
    end else if (x_done) begin
      x_hist[idx] <= x_quot[10:0];
      y_hist[idx] <= y_quot[9:0];
      idx         <= idx + 1'b1;
      updated     <= 1'b1;
    end
  end

  always_comb begin
    x_sum = 13'(x_hist[0]) + 13'(x_hist[1]) + 13'(x_hist[2]) + 13'(x_hist[3]);
    y_sum = 12'(y_hist[0]) + 12'(y_hist[1]) + 12'(y_hist[2]) + 12'(y_hist[3]);
    x_coord = x_sum[12:2];
    y_coord = y_sum[11:2];
  end

  // both dividers start together and take the same time
  assert property (@(posedge clk) disable iff (rst) x_done == y_done);
endmodule
