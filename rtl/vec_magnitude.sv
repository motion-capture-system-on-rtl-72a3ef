// vec_magnitude: length of a vector (Magnitude, built on a square root).
//
// The squares of x, y and z are summed at full width; that sum carries
// 2*FX_F fraction bits, so its integer square root is the length with FX_F
// fraction bits and needs no shift. The root is found bit-serially, one
// result bit per clock (digit-by-digit method). w is ignored. Keeping the
// full-width sum, rather than the design's 18-bit root with half the fraction
// bits, is this design's choice so unit vectors stay accurate.
//
// Timing: start -> done is FX_W+2 = 20 clocks; result saturates at FX_MAX.
module vec_magnitude
  import mocap_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  vec4_t v,
  output logic  busy,
  output logic  done,
  output fx_t   mag
);
  localparam int SW = 2 * FX_W + 2;   // width of the sum of squares (even)
  localparam int RW = SW / 2;         // root width
  logic [SW-1:0] op, res, one;
  logic [SW-1:0] sumsq;
  logic [$clog2(RW+1)-1:0] cnt;

  always_comb
    sumsq = SW'(64'(v.x) * 64'(v.x)) + SW'(64'(v.y) * 64'(v.y)) + SW'(64'(v.z) * 64'(v.z));

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      busy <= 1'b0;
      op   <= '0;
      res  <= '0;
      one  <= '0;
      cnt  <= '0;
      mag  <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        op   <= sumsq;
        res  <= '0;
        one  <= SW'(1) << (SW - 2);
        cnt  <= '0;
      end
    end else if (cnt == ($clog2(RW+1))'(RW)) begin
      busy <= 1'b0;
      done <= 1'b1;
      mag  <= (res > SW'(FX_MAX)) ? FX_MAX : fx_t'(res);
    end else begin
      if (op >= res + one) begin
        op  <= op - (res + one);
        res <= (res >> 1) + one;
      end else begin
        res <= res >> 1;
      end
      one <= one >> 2;
      cnt <= cnt + 1'b1;
    end
  end
endmodule
