// pixel_buffer: FIFO between the polygon drawer and the memory controller.
//
// The drawer produces pixels in bursts, one per clock, while the memory
// controller needs several clocks per pixel; this buffer smooths the flow,
// tells the controller when a pixel is waiting (out_valid) and stalls the
// drawer when full (in_ready low), as in the design. Depth is this design's
// choice.
//
// Timing: a pushed word is visible at the output the next clock; push and
// pop may happen in the same clock.
module pixel_buffer #(
  parameter int WIDTH = 38,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic             full
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic push, pop;

  assign full      = (cnt == (AW+1)'(DEPTH));
  assign in_ready  = !full;
  assign out_valid = (cnt != '0);
  assign out_data  = mem[rp];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (push) begin
        mem[wp] <= in_data;
        wp      <= wp + 1'b1;
      end
      if (pop) rp <= rp + 1'b1;
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (rst) cnt <= (AW+1)'(DEPTH));
endmodule
