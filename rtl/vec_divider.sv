// vec_divider: divides x, y and z of a vector by a scalar (Vector Divider),
// or by the vector's own w (Coord Normalizer).
//
// Three fx_dividers, one per element, run side by side on the same divisor;
// the result's w is 1.0. With by_w set the divisor is v.w, which turns a
// projected homogeneous coordinate back into a normal one. Dividing the
// elements in parallel follows the design (32 clocks latency quoted there);
// the divider itself is this design's sequential one, so a new vector can be
// started only when the previous one is done.
//
// Timing: start -> done is FX_W+FX_F+3 = 27 clocks. Inputs are captured at
// start.
module vec_divider
  import mocap_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  vec4_t v,
  input  fx_t   den,
  input  logic  by_w,
  output logic  busy,
  output logic  done,
  output vec4_t q
);
  vec4_t v_r;
  fx_t   d_r, qx, qy, qz;
  logic  go, run;
  logic  [2:0] dv_done, dv_busy;

  fx_divider div_x (.clk, .rst, .start(go), .num(v_r.x), .den(d_r),
                    .busy(dv_busy[0]), .done(dv_done[0]), .quot(qx));
  fx_divider div_y (.clk, .rst, .start(go), .num(v_r.y), .den(d_r),
                    .busy(dv_busy[1]), .done(dv_done[1]), .quot(qy));
  fx_divider div_z (.clk, .rst, .start(go), .num(v_r.z), .den(d_r),
                    .busy(dv_busy[2]), .done(dv_done[2]), .quot(qz));

  assign busy = run;

  always_ff @(posedge clk) begin
    go   <= 1'b0;
    done <= 1'b0;
    if (rst) begin
      run <= 1'b0;
      v_r <= '0;
      d_r <= '0;
      q   <= '0;
    end else if (!run) begin
      if (start) begin
        v_r <= v;
        d_r <= by_w ? v.w : den;
        run <= 1'b1;
        go  <= 1'b1;
      end
    end else if (dv_done[0]) begin
      q.x  <= qx;
      q.y  <= qy;
      q.z  <= qz;
      q.w  <= FX_ONE;
      run  <= 1'b0;
      done <= 1'b1;
    end
  end

  // the three dividers work in lock step
  assert property (@(posedge clk) disable iff (rst) dv_done[0] |-> &dv_done);
  assert property (@(posedge clk) disable iff (rst) go |-> !(|dv_busy));
endmodule
