// tb_memory_converter: checks address, packing and the off-screen filter.
//
// Random pixels, a quarter of them off the 800x600 screen, are applied. An
// on-screen pixel must go to word y*512 + x/2 (row in the upper address bits,
// pair in the lower nine), half x%2, as {0, colour, shade, depth}, with the
// handshake passed through; an off-screen one must be dropped and accepted.
module tb_memory_converter;
  import mocap_pkg::*;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, sel, dropped;
  logic signed [11:0] x = 0, y = 0;
  logic [10:0] z = 0;
  logic [1:0] color = 0;
  logic [3:0] shade = 0;
  logic [18:0] addr;
  pix_word_t word;
  int checks = 0, failures = 0, n_drop = 0;

  memory_converter dut (.in_valid, .in_ready, .x, .y, .z, .color, .shade, .out_valid, .out_ready,
                        .addr, .sel, .word, .dropped);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int xi, yi;
      logic on;
      xi = ($urandom_range(3) == 0) ? $urandom_range(0, 2000) - 1000 : $urandom_range(0, 799);
      yi = ($urandom_range(3) == 0) ? $urandom_range(0, 2000) - 1000 : $urandom_range(0, 599);
      x = 12'(xi); y = 12'(yi);
      z = 11'($urandom); color = 2'($urandom); shade = 4'($urandom);
      in_valid = 1'($urandom); out_ready = 1'($urandom);
      #1;
      on = xi >= 0 && xi < 800 && yi >= 0 && yi < 600;
      if (in_valid && !on) n_drop++;
      checks++;
      if (out_valid !== (in_valid && on) || dropped !== (in_valid && !on) ||
          in_ready !== (on ? out_ready : 1'b1)) failures++;
      if (on) begin
        checks++;
        if (int'(addr) != yi * 512 + xi / 2 || sel !== 1'(xi % 2) ||
            word !== {1'b0, color, shade, z}) begin
          failures++;
          if (failures < 10) $display("(%0d,%0d) addr %0d sel %b word %h", xi, yi, addr, sel, word);
        end
      end
    end
    checks++;
    if (n_drop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
