// serial_receiver: rebuilds a colour's 2D centre from the link wires.
//
// The interface clock, frame and data wires arrive from the other FPGA. They
// are brought into this FPGA's system clock through two flip-flops each, and
// the data wire is sampled at every falling edge of the synchronised interface
// clock, half an interface period after the sender changed it on the rising
// edge, so data and frame have long settled. A sample taken while the frame wire is high is bit 0 of a record; the
// next 22 samples complete the 23-bit shift register, which is then split into
// colour index, x and y (same layout as serial_sender). The shift register and
// the split follow the design; sampling in the system clock domain on the
// falling edge, instead of clocking the register with the interface clock,
// is this design's choice.
//
// Timing: outputs change, and 'valid' pulses, three system clocks after the
// interface clock falling edge in the middle of bit 22; they hold until the next record.
module serial_receiver #(
  parameter int X_W = 11,
  parameter int Y_W = 10
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           if_clk,
  input  logic           frame,
  input  logic           data,
  output logic [1:0]     color_index,
  output logic [X_W-1:0] x_coord,
  output logic [Y_W-1:0] y_coord,
  output logic           valid
);
  localparam int N = 2 + X_W + Y_W;
  logic [2:0] clk_s;                 // two sync stages + edge history
  logic [1:0] frame_s, data_s;
  logic [N-1:0] shreg;
  logic [$clog2(N+1)-1:0] idx;
  logic edge_seen;
  logic [N-1:0] next_shreg;

  assign edge_seen  = !clk_s[1] && clk_s[2];   // falling edge
  assign next_shreg = {data_s[1], shreg[N-1:1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_s   <= '0;
      frame_s <= '0;
      data_s  <= '0;
    end else begin
      clk_s   <= {clk_s[1:0], if_clk};
      frame_s <= {frame_s[0], frame};
      data_s  <= {data_s[0], data};
    end
  end

  always_ff @(posedge clk) begin
    valid <= 1'b0;
    if (rst) begin
      shreg       <= '0;
      idx         <= '0;
      color_index <= '0;
      x_coord     <= '0;
      y_coord     <= '0;
    end else if (edge_seen) begin
      if (frame_s[1]) begin
        shreg <= next_shreg;
        idx   <= ($clog2(N+1))'(1);
      end else if (idx != '0) begin
        shreg <= next_shreg;
        if (idx == ($clog2(N+1))'(N - 1)) begin
          idx         <= '0;
          color_index <= next_shreg[1:0];
          x_coord     <= next_shreg[2 +: X_W];
          y_coord     <= next_shreg[2 + X_W +: Y_W];
          valid       <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end
endmodule
