// cross_hairs: debug overlay marking a colour's centre of mass.
//
// For every scanned pixel, outputs the cross-hair colour when the pixel lies
// on the centre's column or row and 0 (transparent) otherwise, so the display
// shows a cross through each tracked band, as the design does on its monitor.
//
// Timing: one register stage.
module cross_hairs (
  input  logic        clk,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [10:0] x_coord,
  input  logic [9:0]  y_coord,
  input  logic [17:0] cross_color,
  output logic [17:0] pixel
);
  always_ff @(posedge clk)
    pixel <= ((hcount == x_coord) || (vcount == y_coord)) ? cross_color : 18'd0;
endmodule
