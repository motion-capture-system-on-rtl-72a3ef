// normalizer: restores homogeneous coordinates after the projection.
//
// Incoming vertices are queued in a small buffer; whenever the vector divider
// is free the oldest one is divided by its own w, giving (x/w, y/w, z/w, 1).
// "A buffer that feeds a divider" follows the design; the buffer depth
// (DEPTH, one prism) is this design's choice. in_ready falls when the buffer
// is full.
//
// Timing: about 28 clocks per vertex, results in input order.
module normalizer
  import mocap_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  vec4_t v,
  output logic  in_ready,
  output logic  out_valid,
  output vec4_t r
);
  localparam int AW = $clog2(DEPTH);
  vec4_t buf_q [DEPTH];
  logic [AW-1:0] wr_p, rd_p;
  logic [AW:0]   cnt;
  logic          go, div_busy;
  vec4_t         head;

  assign in_ready = (cnt != (AW+1)'(DEPTH));
  assign head     = buf_q[rd_p];

  always_ff @(posedge clk) begin
    go <= 1'b0;
    if (rst) begin
      wr_p <= '0;
      rd_p <= '0;
      cnt  <= '0;
    end else begin
      if (in_valid && in_ready) begin
        buf_q[wr_p] <= v;
        wr_p        <= wr_p + 1'b1;
      end
      if (!div_busy && !go && cnt != '0) begin
        go   <= 1'b1;
        rd_p <= rd_p + 1'b1;
      end
      cnt <= cnt + (AW+1)'(in_valid && in_ready) - (AW+1)'(!div_busy && !go && cnt != '0);
    end
  end

  vec4_t go_v;
  always_ff @(posedge clk) if (!div_busy && !go && cnt != '0) go_v <= head;

  vec_divider div (.clk, .rst, .start(go), .v(go_v), .den('0), .by_w(1'b1),
                   .busy(div_busy), .done(out_valid), .q(r));
endmodule
