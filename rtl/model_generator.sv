// model_generator: turns one bone into a shaded prism on the screen.
//
// A small state machine drives the graphics pipeline for one bone:
//  1. the bone's two joints (camera pixel coordinates) are mapped to world
//     units by a viewport transformer used as input scaler:
//     world = ((x - 400)/16, (300 - z)/16, (y - 400)/16), i.e. the front
//     camera's horizontal axis is world x, height is world y (up) and the
//     side camera's horizontal axis is depth;
//  2. the prism generator builds 8 vertices and 6 face normals;
//  3. the shader computes the 6 face shades while the 8 vertices stream, one
//     per clock, through the view transformer, the projection transformer,
//     the normaliser (divide by w) and the viewport transformer;
//  4. 'done' pulses when the 8 screen vertices and the 6 shades are ready.
// The chain of sub-blocks and the state-machine control follow the design;
// the input mapping constants are this design's choice.
//
// Timing: roughly 100 (prism) + 8*28 (normaliser) clocks per bone.
module model_generator
  import mocap_pkg::*;
#(
  parameter fx_t IN_SCALE = 18'sd4,       // 1/16
  parameter fx_t IN_CX    = -18'sd1600,   // -400/16
  parameter fx_t IN_CY    = 18'sd1200,    //  300/16
  parameter fx_t IN_CZ    = -18'sd1600    // -400/16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  bone_t      bone,
  input  fx_t        ax, ay, az,          // view rotation
  input  fx_t        dx, dy, dz,          // view translation
  output logic       busy,
  output logic       done,
  output vec4_t      scr   [8],
  output logic [3:0] shade [6]
);
  typedef enum logic [2:0] {IDLE, MAP, PRISM, XFORM, FINISH} st_t;
  st_t st;

  // ---- input mapping ----
  logic  map_in_v, map_out_v;
  vec4_t map_in, map_out, w1, w2;
  logic  [1:0] map_cnt;
  viewport_transformer #(.SX(IN_SCALE), .SY(-IN_SCALE), .SZ(IN_SCALE),
                         .TX(IN_CX), .TY(IN_CY), .TZ(IN_CZ))
    in_map (.clk, .rst, .in_valid(map_in_v), .v(map_in), .out_valid(map_out_v), .r(map_out));

  // ---- prism and shader ----
  logic  pg_go, pg_done, pg_busy, sh_done, sh_busy;
  vec4_t vtx [8];
  vec4_t nrm [6];
  fx_t   sh_scale [6];
  prism_generator pg (.clk, .rst, .start(pg_go), .p1(w1), .p2(w2),
                      .busy(pg_busy), .done(pg_done), .vtx(vtx), .nrm(nrm));
  shader sh (.clk, .rst, .start(pg_done), .vtx(vtx), .nrm(nrm),
             .busy(sh_busy), .done(sh_done), .shade(shade), .scale(sh_scale));

  // ---- transform chain ----
  logic  vt_in_v, vt_out_v, pj_out_v, nz_ready, nz_out_v, vp_out_v;
  vec4_t vt_in, vt_out, pj_out, nz_out, vp_out;
  logic  [3:0] feed_cnt, got_cnt;
  logic  sh_seen;

  view_transformer vt (.clk, .rst, .ax, .ay, .az, .dx, .dy, .dz,
                       .in_valid(vt_in_v), .v(vt_in), .out_valid(vt_out_v), .r(vt_out));
  projection_transformer pj (.clk, .rst, .in_valid(vt_out_v), .v(vt_out),
                             .out_valid(pj_out_v), .r(pj_out));
  normalizer nz (.clk, .rst, .in_valid(pj_out_v), .v(pj_out), .in_ready(nz_ready),
                 .out_valid(nz_out_v), .r(nz_out));
  viewport_transformer vp (.clk, .rst, .in_valid(nz_out_v), .v(nz_out),
                           .out_valid(vp_out_v), .r(vp_out));

  assign busy = (st != IDLE);

  always_comb begin
    map_in   = (map_cnt == 2'd0) ?
               {fx_from_int(int'(bone.a.x)), fx_from_int(int'(bone.a.z)), fx_from_int(int'(bone.a.y)), FX_ONE} :
               {fx_from_int(int'(bone.b.x)), fx_from_int(int'(bone.b.z)), fx_from_int(int'(bone.b.y)), FX_ONE};
    map_in_v = (st == MAP) && (map_cnt < 2'd2);
    vt_in    = vtx[feed_cnt[2:0]];
    vt_in_v  = (st == XFORM) && (feed_cnt < 4'd8) && nz_ready;
  end

  always_ff @(posedge clk) begin
    pg_go <= 1'b0;
    done  <= 1'b0;
    if (rst) begin
      st       <= IDLE;
      map_cnt  <= '0;
      feed_cnt <= '0;
      got_cnt  <= '0;
      sh_seen  <= 1'b0;
      w1       <= '0;
      w2       <= '0;
      for (int i = 0; i < 8; i++) scr[i] <= '0;
    end else begin
      if (vp_out_v && got_cnt < 4'd8) begin
        scr[got_cnt[2:0]] <= vp_out;
        got_cnt           <= got_cnt + 1'b1;
      end
      if (sh_done) sh_seen <= 1'b1;
      unique case (st)
        IDLE: if (start) begin
          map_cnt <= '0;
          st      <= MAP;
        end
        MAP: begin
          if (map_cnt < 2'd2) map_cnt <= map_cnt + 1'b1;
          if (map_out_v) begin
            if (map_cnt == 2'd1) w1 <= map_out;
            else begin
              w2    <= map_out;
              pg_go <= 1'b1;
              st    <= PRISM;
            end
          end
        end
        PRISM: if (pg_done) begin
          feed_cnt <= '0;
          got_cnt  <= '0;
          sh_seen  <= 1'b0;
          st       <= XFORM;
        end
        XFORM: begin
          if (vt_in_v) feed_cnt <= feed_cnt + 1'b1;
          if (got_cnt == 4'd8 && (sh_seen || sh_done)) st <= FINISH;
        end
        FINISH: begin
          done <= 1'b1;
          st   <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
