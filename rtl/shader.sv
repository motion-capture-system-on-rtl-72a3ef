// shader: brightness of each face of a prism.
//
// The light is a uniform source in the z = 0 plane shining along +z, so for a
// face with unit normal n the incident fraction is n.z and the distance to the
// light is the face's z, taken as the mean z of its four vertices. Per face:
//   scale = min(max(n.z * K / d^2, 0) + AMBIENT, 1)
// and the 4-bit shade is floor(scale * 15). The formula, K = 2000 and the
// ambient 0.4 follow the design's prototype; d is kept at least one
// fixed-point step. The division by d^2 is done as two divisions by d, so
// that d^2 never has to fit the 18-bit format (faces up to 2047 units away). Face vertex sets are those of
// prism_generator (front, back, top, bottom, left, right).
//
// Timing: the six faces share one divider, two divisions each; start -> done
// about 6*(2*27+1) = 330 clocks. Outputs hold until the next start.
module shader
  import mocap_pkg::*;
#(
  parameter fx_t K       = 18'sd128000,  // 2000
  parameter fx_t AMBIENT = 18'sd26       // 0.4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  vec4_t      vtx [8],
  input  vec4_t      nrm [6],
  output logic       busy,
  output logic       done,
  output logic [3:0] shade [6],
  output fx_t        scale [6]
);
  // vertex indices of each face
  localparam logic [2:0] FACE [6][4] = '{
    '{3'd0, 3'd1, 3'd2, 3'd3},   // front
    '{3'd4, 3'd5, 3'd6, 3'd7},   // back
    '{3'd4, 3'd5, 3'd1, 3'd0},   // top
    '{3'd7, 3'd6, 3'd2, 3'd3},   // bottom
    '{3'd4, 3'd0, 3'd3, 3'd7},   // left
    '{3'd1, 3'd5, 3'd6, 3'd2}    // right
  };

  typedef enum logic [1:0] {IDLE, DIV1, DIV2, NEXT} st_t;
  st_t  st;
  logic [2:0] f;
  logic go, dv_done, dv_busy;
  fx_t  num, den, quot;
  logic signed [63:0] zsum;
  fx_t  d, t, s;
  logic signed [63:0] s15;

  always_comb begin
    zsum = 64'(vtx[FACE[f][0]].z) + 64'(vtx[FACE[f][1]].z) +
           64'(vtx[FACE[f][2]].z) + 64'(vtx[FACE[f][3]].z);
    d    = fx_sat(zsum >>> 2);
    if (d < fx_t'(1)) d = fx_t'(1);
    // first pass: n.z * K / d; second pass: that / d
    num  = (st == DIV2) ? t : fx_mul(nrm[f].z, K);
    den  = d;
    // clamp: negative light counts as none, then ambient, capped at 1.0
    s    = fx_add((quot[FX_W-1] ? fx_t'(0) : quot), AMBIENT);
    if (s > FX_ONE) s = FX_ONE;
    s15  = (64'(s) * 64'(15)) >>> FX_F;
  end

  fx_divider div (.clk, .rst, .start(go), .num(num), .den(den),
                  .busy(dv_busy), .done(dv_done), .quot(quot));

  assign busy = (st != IDLE);

  always_ff @(posedge clk) begin
    go   <= 1'b0;
    done <= 1'b0;
    if (rst) begin
      st <= IDLE;
      f  <= '0;
      t  <= '0;
      for (int i = 0; i < 6; i++) begin
        shade[i] <= '0;
        scale[i] <= '0;
      end
    end else begin
      unique case (st)
        IDLE: if (start) begin
          f  <= '0;
          go <= 1'b1;
          st <= DIV1;
        end
        DIV1: if (dv_done) begin
          t  <= quot;
          go <= 1'b1;
          st <= DIV2;
        end
        DIV2: if (dv_done) begin
          scale[f] <= s;
          shade[f] <= (s15 > 64'sd15) ? 4'd15 : 4'(s15);
          st       <= NEXT;
        end
        NEXT: begin
          if (f == 3'd5) begin
            done <= 1'b1;
            st   <= IDLE;
          end else begin
            f  <= f + 1'b1;
            go <= 1'b1;
            st <= DIV1;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
