// prism_generator: rectangular prism around a bone (Rectangular Prism Generator).
//
// From the bone's end points p1 and p2 it forms the bone vector p1 - p2 and
// normalises it (unit bone, the normal of the front and back faces). The
// cross product of the unit bone with the x axis gives a perpendicular vector
// A, normalised to the top/bottom normal; the cross product of A with the
// unit bone gives B, the left/right normal. If the first cross product is zero
// (bone along x), A and B are taken as the y and z axes. The eight vertices are
// p1 or p2 plus or minus HALF_W_A*A and HALF_W_B*B, numbered as follows:
//   v0 = p1 + a - b, v1 = p1 + a + b, v2 = p1 - a + b, v3 = p1 - a - b,
//   v4..v7 the same around p2;
// faces: front v0-v3, back v4-v7, top v4 v5 v1 v0, bottom v7 v6 v2 v3,
// left v4 v0 v3 v7, right v1 v5 v6 v2. Normals are output in the order
// front, back, top, bottom, left, right = (U, -U, A, -A, -B, B).
// The algorithm and numbering follow the design. It is built here as a
// sequencer around one magnitude unit and one vector divider (the design
// used a throughput-optimised pipeline); the half-widths are this design's
// choice.
//
// Timing: start -> done about 2*(20+27)+6 = 100 clocks; outputs hold until
// the next start.
module prism_generator
  import mocap_pkg::*;
#(
  parameter fx_t HALF_W_A = FX_ONE,
  parameter fx_t HALF_W_B = FX_ONE
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  vec4_t p1,
  input  vec4_t p2,
  output logic  busy,
  output logic  done,
  output vec4_t vtx [8],
  output vec4_t nrm [6]
);
  typedef enum logic [2:0] {IDLE, MAG_B, DIV_B, MAG_A, DIV_A, VERT} st_t;
  st_t   st;
  vec4_t p1_r, p2_r, bone, ub, ua, ubb, perp_a;
  fx_t   mag;
  logic  mag_go, mag_done, mag_busy, div_go, div_done, div_busy;
  vec4_t mag_in, div_in, div_q;
  vec4_t sa, sb;
  vec4_t unit_x;

  assign unit_x = vec_make(FX_ONE, '0, '0);
  assign perp_a = vec_cross(ub, unit_x);

  vec_magnitude u_mag (.clk, .rst, .start(mag_go), .v(mag_in),
                       .busy(mag_busy), .done(mag_done), .mag(mag));
  vec_divider   u_div (.clk, .rst, .start(div_go), .v(div_in), .den(mag), .by_w(1'b0),
                       .busy(div_busy), .done(div_done), .q(div_q));

  assign busy = (st != IDLE);

  always_comb begin
    sa = vec_scale(ua, HALF_W_A);
    sb = vec_scale(ubb, HALF_W_B);
  end

  always_ff @(posedge clk) begin
    mag_go <= 1'b0;
    div_go <= 1'b0;
    done   <= 1'b0;
    if (rst) begin
      st     <= IDLE;
      p1_r   <= '0;
      p2_r   <= '0;
      bone   <= '0;
      ub     <= '0;
      ua     <= '0;
      ubb    <= '0;
      mag_in <= '0;
      div_in <= '0;
      for (int i = 0; i < 8; i++) vtx[i] <= '0;
      for (int i = 0; i < 6; i++) nrm[i] <= '0;
    end else begin
      unique case (st)
        IDLE: if (start) begin
          p1_r   <= p1;
          p2_r   <= p2;
          bone   <= vec_dif(p1, p2);
          mag_in <= vec_dif(p1, p2);
          mag_go <= 1'b1;
          st     <= MAG_B;
        end
        MAG_B: if (mag_done) begin
          div_in <= bone;
          div_go <= 1'b1;
          st     <= DIV_B;
        end
        DIV_B: if (div_done) begin
          ub <= div_q;
          st <= MAG_A;
        end
        MAG_A: begin
          // ub is now registered; perp_a = ub x unit_x
          if (!mag_busy && !mag_go && !mag_done) begin
            if (perp_a.x == '0 && perp_a.y == '0 && perp_a.z == '0) begin
              ua  <= vec_make('0, FX_ONE, '0);
              ubb <= vec_make('0, '0, FX_ONE);
              st  <= VERT;
            end else begin
              mag_in <= perp_a;
              div_in <= perp_a;
              mag_go <= 1'b1;
            end
          end else if (mag_done) begin
            div_go <= 1'b1;
            st     <= DIV_A;
          end
        end
        DIV_A: if (div_done) begin
          ua  <= div_q;
          ubb <= vec_cross(div_q, ub);
          st  <= VERT;
        end
        VERT: begin
          vtx[0] <= vec_dif(vec_sum(p1_r, sa), sb);
          vtx[1] <= vec_sum(vec_sum(p1_r, sa), sb);
          vtx[2] <= vec_sum(vec_dif(p1_r, sa), sb);
          vtx[3] <= vec_dif(vec_dif(p1_r, sa), sb);
          vtx[4] <= vec_dif(vec_sum(p2_r, sa), sb);
          vtx[5] <= vec_sum(vec_sum(p2_r, sa), sb);
          vtx[6] <= vec_sum(vec_dif(p2_r, sa), sb);
          vtx[7] <= vec_dif(vec_dif(p2_r, sa), sb);
          nrm[0] <= ub;
          nrm[1] <= vec_neg(ub);
          nrm[2] <= ua;
          nrm[3] <= vec_neg(ua);
          nrm[4] <= vec_neg(ubb);
          nrm[5] <= ubb;
          done   <= 1'b1;
          st     <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
