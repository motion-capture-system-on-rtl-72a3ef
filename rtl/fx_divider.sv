// fx_divider: signed fixed-point divider (the "Divides" wrapper).
//
// quot = num / den in the shared 18-bit fixed-point format. The magnitudes
// are divided as integers, |num| shifted left by FX_F first so the quotient
// keeps FX_F fraction bits, and the sign is applied afterwards. A quotient
// beyond the representable range saturates ("ensure that result stays
// within the bounds"); division by zero returns the saturated value with the
// numerator's sign. The restoring, bit-serial structure is this design's
// choice.
//
// Timing: start -> done is FX_W+FX_F+1 = 25 clocks; one division at a time.
module fx_divider
  import mocap_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  fx_t  num,
  input  fx_t  den,
  output logic busy,
  output logic done,
  output fx_t  quot
);
  localparam int NW = FX_W + FX_F;
  logic          neg_q, neg_q_r, den_zero, den_zero_r, core_busy, core_done;
  logic [NW-1:0] n_abs, q_abs;
  logic [FX_W-1:0] d_abs, r_unused;
  logic signed [63:0] q_signed;

  always_comb begin
    neg_q    = num[FX_W-1] ^ den[FX_W-1];
    den_zero = (den == '0);
    n_abs    = NW'(num[FX_W-1] ? -64'(num) : 64'(num)) << FX_F;
    d_abs    = FX_W'(den[FX_W-1] ? -64'(den) : 64'(den));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      neg_q_r    <= 1'b0;
      den_zero_r <= 1'b0;
    end else if (start && !core_busy) begin
      neg_q_r    <= den_zero ? num[FX_W-1] : neg_q;
      den_zero_r <= den_zero;
    end
  end

  udiv_seq #(.NW(NW), .DW(FX_W)) core (
    .clk, .rst, .start(start && !core_busy), .num(n_abs), .den(d_abs),
    .busy(core_busy), .done(core_done), .quot(q_abs), .rem(r_unused));

  assign q_signed = neg_q_r ? -64'(q_abs) : 64'(q_abs);

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      quot <= '0;
    end else if (core_done) begin
      done <= 1'b1;
      if (den_zero_r) quot <= neg_q_r ? FX_MIN : FX_MAX;
      else            quot <= fx_sat(q_signed);
    end
  end

  assign busy = core_busy || core_done;
endmodule
