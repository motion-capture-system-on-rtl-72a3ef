// serial_sender: sends one colour's 2D centre to the other FPGA.
//
// Once per video frame a 23-bit record {y[9:0], x[10:0], color[1:0]} is
// shifted out LSB first on one data wire: the two colour-index bits, then the
// 11-bit horizontal coordinate, then the 10-bit vertical coordinate, one bit
// per interface clock, as the design does. Four of these run in parallel,
// one wire per colour, sharing the interface clock and frame wires.
//
// Timing: 'frame' is the one-system-cycle pulse at hcount = vcount = 0. It is
// remembered until the next interface clock rising edge ('tick'); at that edge
// the coordinates are captured, 'frame_out' goes high for one interface period
// and 'data' carries bit 0. Bits 1..22 follow on the next 22 ticks, after which
// data returns to 0. Holding frame_out for a whole interface period, so the
// receiver cannot miss it, is this design's choice.
module serial_sender #(
  parameter int X_W = 11,
  parameter int Y_W = 10
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           tick,         // interface clock rising edge strobe
  input  logic           frame,        // frame start pulse
  input  logic [1:0]     color_index,
  input  logic [X_W-1:0] x_coord,
  input  logic [Y_W-1:0] y_coord,
  output logic           data,
  output logic           frame_out,
  output logic           sending
);
  localparam int N = 2 + X_W + Y_W;
  logic [N-1:0] shreg;
  logic [$clog2(N+1)-1:0] left;
  logic pending;

  assign sending = (left != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      pending   <= 1'b0;
      shreg     <= '0;
      left      <= '0;
      data      <= 1'b0;
      frame_out <= 1'b0;
    end else begin
      if (frame) pending <= 1'b1;
      if (tick) begin
        if (pending || frame) begin
          pending   <= 1'b0;
          frame_out <= 1'b1;
          data      <= color_index[0];
          shreg     <= {1'b0, y_coord, x_coord, color_index[1]};
          left      <= ($clog2(N+1))'(N - 1);
        end else begin
          frame_out <= 1'b0;
          if (left != '0) begin
            data  <= shreg[0];
            shreg <= shreg >> 1;
            left  <= left - 1'b1;
          end else begin
            data <= 1'b0;
          end
        end
      end
    end
  end
endmodule
