// matrix_mult: 4x4 matrix times 4x1 vector.
//
// Sixteen fixed-point products are summed per row at full width and
// saturated once (mocap_pkg::mat_vec_mul). One register stage, so a new
// vector can enter every clock, as in the design's view transformer.
//
// Timing: out_valid/r follow in_valid/m/v by one clock.
module matrix_mult
  import mocap_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  mat4_t m,
  input  vec4_t v,
  output logic  out_valid,
  output vec4_t r
);
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      r         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) r <= mat_vec_mul(m, v);
    end
  end
endmodule
