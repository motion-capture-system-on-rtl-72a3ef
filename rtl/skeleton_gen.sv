// skeleton_gen: pairs joints into bones by colour.
//
// The four 3D points carry their colour index. Bone 0 is the point coloured
// PAIR0_A followed by the point coloured PAIR0_B (red with green by default),
// bone 1 pairs PAIR1_A with PAIR1_B (yellow with blue), as the design
// hard-wires it: the user wears red and green on one arm, yellow and blue on
// the other. The joints may arrive on any input; they are found by the
// colour field. 'found' says which bones had both of their colours present.
//
// Timing: one register stage.
module skeleton_gen
  import mocap_pkg::*;
#(
  parameter color_t PAIR0_A = RED,
  parameter color_t PAIR0_B = GREEN,
  parameter color_t PAIR1_A = YELLOW,
  parameter color_t PAIR1_B = BLUE
) (
  input  logic  clk,
  input  logic  rst,
  input  xyz_t  joint [4],
  output bone_t bone  [2],
  output logic [1:0] found
);
  color_t want_a [2];
  color_t want_b [2];
  bone_t  nb [2];
  logic [1:0] ha, hb;

  assign want_a[0] = PAIR0_A;
  assign want_b[0] = PAIR0_B;
  assign want_a[1] = PAIR1_A;
  assign want_b[1] = PAIR1_B;

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      nb[b] = '0;
      ha[b] = 1'b0;
      hb[b] = 1'b0;
      for (int j = 0; j < 4; j++) begin
        if (joint[j].color == want_a[b] && !ha[b]) begin
          nb[b].a = joint[j];
          ha[b]   = 1'b1;
        end
        if (joint[j].color == want_b[b] && !hb[b]) begin
          nb[b].b = joint[j];
          hb[b]   = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bone[0] <= '0;
      bone[1] <= '0;
      found   <= '0;
    end else begin
      bone[0] <= nb[0];
      bone[1] <= nb[1];
      found   <= ha & hb;
    end
  end
endmodule
