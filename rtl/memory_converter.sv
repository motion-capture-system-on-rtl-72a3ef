// memory_converter: pixel to frame-buffer address and data.
//
// Each drawn pixel becomes an 18-bit field {0, colour[1:0], shade[3:0],
// depth[10:0]} (17 useful bits, as the design packs it), a word address
// {y[9:0], x[9:1]} in the 36-bit-wide ZBT memory and a selector x[0] telling
// which half of the word the pixel occupies (0 = bits 17:0). Pixels outside
// the H_ACTIVE x V_ACTIVE screen are accepted and dropped. The packing and
// the off-screen filter follow the design; the address split (9 bits of x,
// so a 800-pixel line fits its 400 words) is this design's reading of it.
//
// The address, selector and pixel word are rearranged input bits, so most
// output bits are plain wires from the inputs: the block's logic is the
// screen test and the handshake around it.
//
// Timing: combinational; in_ready follows out_ready for on-screen pixels.
module memory_converter
  import mocap_pkg::*;
#(
  parameter int H_ACTIVE = 800,
  parameter int V_ACTIVE = 600
) (
  input  logic               in_valid,
  output logic               in_ready,
  input  logic signed [11:0] x,
  input  logic signed [11:0] y,
  input  logic [10:0]        z,
  input  logic [1:0]         color,
  input  logic [3:0]         shade,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [18:0]        addr,
  output logic               sel,
  output pix_word_t          word,
  output logic               dropped
);
  logic on_screen;
  always_comb begin
    on_screen = (x >= 0) && (y >= 0) && (x < 12'(H_ACTIVE)) && (y < 12'(V_ACTIVE));
    out_valid = in_valid && on_screen;
    in_ready  = on_screen ? out_ready : 1'b1;
    dropped   = in_valid && !on_screen;
    addr      = {y[9:0], x[9:1]};
    sel       = x[0];
    word      = '{zero: 1'b0, color: color, shade: shade, depth: z};
  end
endmodule
