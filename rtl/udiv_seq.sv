// udiv_seq: unsigned restoring divider, one quotient bit per clock.
//
// A 'start' pulse loads num and den; NW clocks later 'done' pulses for one
// cycle with quot = num / den and rem = num % den. 'busy' is high meanwhile
// and a start while busy is ignored. Division by zero gives an all-ones
// quotient. Used by the centre of mass averaging and by the fixed-point
// divider; the design only says a divider is used, its structure is chosen here.
module udiv_seq #(
  parameter int NW = 25,  // numerator / quotient width
  parameter int DW = 25   // denominator width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quot,
  output logic [DW-1:0] rem
);
  logic [NW-1:0] q;
  logic [DW:0]   r;
  logic [DW-1:0] d;
  logic [$clog2(NW+1)-1:0] cnt;
  logic [DW:0]   r_shift;

  assign r_shift = {r[DW-1:0], q[NW-1]};

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      busy <= 1'b0;
      cnt  <= '0;
      q    <= '0;
      r    <= '0;
      d    <= '0;
      quot <= '0;
      rem  <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        q    <= num;
        r    <= '0;
        d    <= den;
        cnt  <= '0;
      end
    end else begin
      // shift the next numerator bit into the partial remainder
      if (r_shift >= {1'b0, d}) begin
        r <= r_shift - {1'b0, d};
        q <= {q[NW-2:0], 1'b1};
      end else begin
        r <= r_shift;
        q <= {q[NW-2:0], 1'b0};
      end
      cnt <= cnt + 1'b1;
      if (cnt == ($clog2(NW+1))'(NW - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
        quot <= (r_shift >= {1'b0, d}) ? {q[NW-2:0], 1'b1} : {q[NW-2:0], 1'b0};
        rem  <= (r_shift >= {1'b0, d}) ? DW'(r_shift - {1'b0, d}) : DW'(r_shift);
      end
    end
  end
endmodule
