// interface_clock_div: slow clock for the link between the two FPGAs.
//
// An 8-bit counter runs on the 40 MHz system clock; each time it wraps the
// interface clock toggles, giving a square wave of 2^(DIV_BITS+1) system
// clocks per period (512 at the default, about 78 kHz). The divider follows
// the design. 'rise' is this design's addition: a one-cycle strobe in the
// first system cycle in which if_clk is high, so the sender can run on the
// system clock with a clock enable instead of on a derived clock.
module interface_clock_div #(
  parameter int DIV_BITS = 8
) (
  input  logic clk,
  input  logic rst,
  output logic if_clk,
  output logic rise
);
  logic [DIV_BITS-1:0] counter;

  always_ff @(posedge clk) begin
    if (rst) begin
      counter <= '0;
      if_clk  <= 1'b0;
      rise    <= 1'b0;
    end else begin
      counter <= counter + 1'b1;
      rise    <= 1'b0;
      if (counter == '1) begin
        if_clk <= ~if_clk;
        rise   <= ~if_clk;
      end
    end
  end
endmodule
