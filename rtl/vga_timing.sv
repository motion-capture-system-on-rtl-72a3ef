// vga_timing: pixel counters and sync pulses for an 800x600 display.
//
// hcount runs 0..H_TOTAL-1 and vcount 0..V_TOTAL-1; blank is high outside the
// visible area; hsync and vsync are active-high pulses (the polarity of the
// 800x600 at 60 Hz mode, 40 MHz pixel clock). The defaults are that standard
// mode's timing; the counters also drive the video side's pixel positions.
//
// Timing: all outputs registered.
module vga_timing #(
  parameter int H_ACTIVE = 800,
  parameter int H_FP     = 40,
  parameter int H_SYNC   = 128,
  parameter int H_BP     = 88,
  parameter int V_ACTIVE = 600,
  parameter int V_FP     = 1,
  parameter int V_SYNC   = 4,
  parameter int V_BP     = 23
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  localparam int H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  logic [10:0] hn;
  logic [9:0]  vn;

  always_comb begin
    hn = (hcount == 11'(H_TOTAL - 1)) ? 11'd0 : hcount + 1'b1;
    vn = vcount;
    if (hcount == 11'(H_TOTAL - 1))
      vn = (vcount == 10'(V_TOTAL - 1)) ? 10'd0 : vcount + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b0;
      vsync  <= 1'b0;
      blank  <= 1'b0;
    end else begin
      hcount <= hn;
      vcount <= vn;
      hsync  <= (hn >= 11'(H_ACTIVE + H_FP)) && (hn < 11'(H_ACTIVE + H_FP + H_SYNC));
      vsync  <= (vn >= 10'(V_ACTIVE + V_FP)) && (vn < 10'(V_ACTIVE + V_FP + V_SYNC));
      blank  <= (hn >= 11'(H_ACTIVE)) || (vn >= 10'(V_ACTIVE));
    end
  end
endmodule
