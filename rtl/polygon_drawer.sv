// polygon_drawer: fills a four-sided polygon with depth (Polygon Drawer).
//
// Set-up: the plane through vertices 0, 1 and 2 gives A, B, C; a polygon with
// C = 0 is edge-on and draws nothing. One divider then computes, with 16
// fraction bits, A/C and B/C (so each pixel's depth needs only multipliers)
// and, for each side i (from vertex i to vertex i-1), the slope
// M = (x_j - x_i) / (y_j - y_i) and intercept B = x_i - M*y_i of x = M*y + B.
// Scan: for each row y from y_min to y_max - 1, a side crosses the row when
// one end is below y and the other at or above it; the smallest and largest
// crossing x, clipped to [x_min, x_max], bound the span, and pixels
// start+1 .. end-1 are emitted with depth
//   z = z0 - (A/C)*(x - x0) - (B/C)*(y - y0).
// Pixels with negative depth are skipped, larger depths clamp to 2047.
// The algorithm (bounds, per-side slope and intercept, two sorted crossings,
// plane-equation depth) follows the design and its prototype; fixed-point
// formats and the use of A/C and B/C instead of 1/C are this design's choices.
//
// Interface: 'start' with the vertices, colour and shade held steady;
// pixels leave on pix_valid/pix_ready (one per clock when ready); 'done'
// pulses after the last pixel. Set-up takes about 6*50 clocks.
module polygon_drawer (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic signed [11:0] vx [4],
  input  logic signed [11:0] vy [4],
  input  logic signed [11:0] vz [4],
  input  logic [1:0]         color,
  input  logic [3:0]         shade,
  output logic               busy,
  output logic               done,
  output logic               pix_valid,
  input  logic               pix_ready,
  output logic signed [11:0] pix_x,
  output logic signed [11:0] pix_y,
  output logic [10:0]        pix_z,
  output logic [1:0]         pix_color,
  output logic [3:0]         pix_shade
);
  localparam int FB = 16;   // fraction bits of slopes and depth ratios
  typedef enum logic [2:0] {IDLE, SETUP, DIV, DIVW, ROW, PIX} st_t;
  st_t st;

  logic signed [11:0] px [4], py [4], pz [4];
  logic [1:0] col_r;
  logic [3:0] sh_r;
  logic signed [31:0] pa, pb, pc;
  logic signed [47:0] pd;
  logic signed [63:0] ac, bc;          // A/C, B/C  (Q16)
  logic signed [63:0] m [4], bi [4];   // side slope and intercept (Q16)
  logic signed [11:0] xmin, xmax, ymin, ymax;
  logic signed [11:0] y, x, xend;
  logic [2:0] k;                       // division index 0..5

  plane_equation pe (.x0(px[0]), .y0(py[0]), .z0(pz[0]),
                     .x1(px[1]), .y1(py[1]), .z1(pz[1]),
                     .x2(px[2]), .y2(py[2]), .z2(pz[2]),
                     .a(pa), .b(pb), .c(pc), .d(pd));

  // ---- signed divider: (num << FB) / den ----
  logic signed [63:0] dnum, dden;
  logic        dgo, dbusy, ddone, dneg;
  logic [47:0] dq;
  logic [31:0] drem;
  logic [1:0]  ki, kj;
  always_comb begin
    ki = 2'(k - 3'd2);
    kj = 2'(k - 3'd3);                 // previous vertex (side i -> i-1)
    unique case (k)
      3'd0:    begin dnum = 64'(pa); dden = 64'(pc); end
      3'd1:    begin dnum = 64'(pb); dden = 64'(pc); end
      default: begin
        dnum = 64'(px[kj]) - 64'(px[ki]);
        dden = 64'(py[kj]) - 64'(py[ki]);
      end
    endcase
  end
  udiv_seq #(.NW(48), .DW(32)) div (
    .clk, .rst, .start(dgo),
    .num(48'((dnum < 0 ? -dnum : dnum) <<< FB)),
    .den(32'(dden < 0 ? -dden : dden)),
    .busy(dbusy), .done(ddone), .quot(dq), .rem(drem));

  // ---- row crossings ----
  logic signed [63:0] xs [4];
  logic [3:0] crosses;
  logic signed [63:0] lo, hi;
  logic any2;
  always_comb begin
    lo = 64'sd1 <<< 40;
    hi = -(64'sd1 <<< 40);
    for (int i = 0; i < 4; i++) begin
      automatic int j = (i + 3) % 4;
      crosses[i] = (py[i] < y && py[j] >= y) || (py[j] < y && py[i] >= y);
      xs[i] = (m[i] * 64'(y) + bi[i]) >>> FB;
      if (crosses[i] && xs[i] < lo) lo = xs[i];
      if (crosses[i] && xs[i] > hi) hi = xs[i];
    end
    any2 = ($countones(crosses) >= 2);
  end

  // ---- pixel depth ----
  logic signed [63:0] zpix;
  always_comb
    zpix = 64'(pz[0]) - ((ac * (64'(x) - 64'(px[0])) + bc * (64'(y) - 64'(py[0]))) >>> FB);

  assign busy      = (st != IDLE);
  assign pix_valid = (st == PIX) && (zpix >= 0);
  assign pix_x     = x;
  assign pix_y     = y;
  assign pix_z     = (zpix > 64'sd2047) ? 11'h7FF : 11'(zpix);
  assign pix_color = col_r;
  assign pix_shade = sh_r;

  always_ff @(posedge clk) begin
    dgo  <= 1'b0;
    done <= 1'b0;
    if (rst) begin
      st    <= IDLE;
      k     <= '0;
      dneg  <= 1'b0;
      ac    <= '0;
      bc    <= '0;
      y     <= '0;
      x     <= '0;
      xend  <= '0;
      col_r <= '0;
      sh_r  <= '0;
      for (int i = 0; i < 4; i++) begin
        px[i] <= '0; py[i] <= '0; pz[i] <= '0; m[i] <= '0; bi[i] <= '0;
      end
    end else begin
      unique case (st)
        IDLE: if (start) begin
          for (int i = 0; i < 4; i++) begin
            px[i] <= vx[i]; py[i] <= vy[i]; pz[i] <= vz[i];
          end
          col_r <= color;
          sh_r  <= shade;
          st    <= SETUP;
        end
        SETUP: begin
          if (pc == 0) begin
            done <= 1'b1;
            st   <= IDLE;
          end else begin
            k  <= '0;
            st <= DIV;
          end
        end
        DIV: begin
          if (k >= 3'd2 && dden == 0) begin
            m[ki]  <= '0;
            bi[ki] <= 64'(px[ki]) <<< FB;
            if (k == 3'd5) begin y <= ymin; st <= ROW; end
            else k <= k + 1'b1;
          end else begin
            dneg <= (dnum < 0) ^ (dden < 0);
            dgo  <= 1'b1;
            st   <= DIVW;
          end
        end
        DIVW: if (ddone) begin
          unique case (k)
            3'd0:    ac <= dneg ? -64'(dq) : 64'(dq);
            3'd1:    bc <= dneg ? -64'(dq) : 64'(dq);
            default: begin
              m[ki]  <= dneg ? -64'(dq) : 64'(dq);
              bi[ki] <= (64'(px[ki]) <<< FB) - (dneg ? -64'(dq) : 64'(dq)) * 64'(py[ki]);
            end
          endcase
          if (k == 3'd5) begin y <= ymin; st <= ROW; end
          else begin k <= k + 1'b1; st <= DIV; end
        end
        ROW: begin
          if (y >= ymax) begin
            done <= 1'b1;
            st   <= IDLE;
          end else if (!any2 || lo >= 64'(xmax) || hi <= 64'(xmin)) begin
            y <= y + 1'b1;
          end else begin
            x    <= 12'((lo < 64'(xmin) ? 64'(xmin) : lo) + 1);
            xend <= 12'(hi > 64'(xmax) ? 64'(xmax) : hi);
            if (((lo < 64'(xmin) ? 64'(xmin) : lo) + 1) < (hi > 64'(xmax) ? 64'(xmax) : hi))
              st <= PIX;
            else
              y <= y + 1'b1;
          end
        end
        PIX: if (pix_ready || !pix_valid) begin
          if (x + 12'sd1 >= xend) begin
            y  <= y + 1'b1;
            st <= ROW;
          end else begin
            x <= x + 1'b1;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  // bounds: registered once after the vertices are captured
  always_ff @(posedge clk) begin
    if (st == SETUP) begin
      xmin <= 12'(min4(px[0], px[1], px[2], px[3]));
      xmax <= 12'(max4(px[0], px[1], px[2], px[3]));
      ymin <= 12'(min4(py[0], py[1], py[2], py[3]));
      ymax <= 12'(max4(py[0], py[1], py[2], py[3]));
    end
  end

  function automatic logic signed [11:0] min4(input logic signed [11:0] a0, a1, a2, a3);
    logic signed [11:0] r;
    r = a0;
    if (a1 < r) r = a1;
    if (a2 < r) r = a2;
    if (a3 < r) r = a3;
    return r;
  endfunction
  function automatic logic signed [11:0] max4(input logic signed [11:0] a0, a1, a2, a3);
    logic signed [11:0] r;
    r = a0;
    if (a1 > r) r = a1;
    if (a2 > r) r = a2;
    if (a3 > r) r = a3;
    return r;
  endfunction

  assert property (@(posedge clk) disable iff (rst) dgo |-> !dbusy);
endmodule
