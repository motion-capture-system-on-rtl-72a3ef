// tb_zbt_to_vga: checks the display path over a full 800x600 frame.
//
// The ZBT model is filled with a pattern in which every pixel has its own
// colour and shade. For every clock the expected output is worked out from
// the scan position four clocks earlier: blank outside the 800x600 area,
// otherwise the base colour at level shade*17 of the half selected by x.
// The sync pulses must be 128 clocks and 4 lines long and a frame must be
// 1056 x 628 clocks.
module tb_zbt_to_vga;
  import mocap_pkg::*;
  logic clk = 0, rst = 1;
  logic [18:0] disp_addr;
  logic [35:0] rdata;
  logic [23:0] rgb;
  logic hsync, vsync, blank, vsync_now;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  int checks = 0, failures = 0, cyc = 0;
  int hq [$], vq [$];
  int hs_len = 0, vs_len = 0, last_vs_rise = -1, n_lit = 0;
  logic hs_p = 0, vs_p = 0;

  zbt_to_vga dut (.clk, .rst, .disp_addr, .rdata, .rgb, .hsync, .vsync, .blank, .vsync_now,
                  .hcount, .vcount);
  zbt_sram_model zbt (.clk, .addr(disp_addr), .we(1'b0), .wdata(36'd0), .rdata);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [17:0] pattern(input int x, input int y);
    return {1'b0, 2'((x * 7 + y) >> 3), 4'(x + 3 * y), 11'(x ^ y)};
  endfunction

  function automatic logic [23:0] lut(input logic [17:0] w);
    logic [7:0] l;
    l = 8'(w[14:11]) * 8'd17;
    case (w[16:15])
      2'd0: return {l, 8'd0, 8'd0};
      2'd1: return {l, l, 8'd0};
      2'd2: return {8'd0, l, 8'd0};
      default: return {8'd0, 8'd0, l};
    endcase
  endfunction

  initial begin
    for (int y = 0; y < 600; y++)
      for (int x = 0; x < 800; x += 2) zbt.mem[y * 512 + x / 2] = {pattern(x + 1, y), pattern(x, y)};
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
  end

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      cyc++;
      hq.push_back(int'(hcount));
      vq.push_back(int'(vcount));
      if (hq.size() > 4) begin
        int h, v;
        logic [23:0] e;
        h = hq.pop_front();
        v = vq.pop_front();
        e = (h < 800 && v < 600) ? lut(pattern(h, v)) : 24'd0;
        if (cyc > 5) begin
          checks++;
          if (rgb !== e || blank !== !(h < 800 && v < 600)) begin
            failures++;
            if (failures < 10) $display("(%0d,%0d) rgb %h exp %h blank %b", h, v, rgb, e, blank);
          end
          if (rgb != 0) n_lit++;
        end
      end
      // sync widths
      if (hsync) hs_len++;
      if (!hsync && hs_p) begin
        checks++;
        if (hs_len != 128) failures++;
        hs_len = 0;
      end
      if (vsync && !vs_p) begin
        if (last_vs_rise >= 0) begin
          checks++;
          if (cyc - last_vs_rise != 1056 * 628) failures++;
        end
        last_vs_rise = cyc;
      end
      if (vsync) vs_len++;
      if (!vsync && vs_p) begin
        checks++;
        if (vs_len != 4 * 1056) failures++;
        vs_len = 0;
      end
      hs_p = hsync;
      vs_p = vsync;
      if (cyc == 1056 * 628 * 2 + 100) begin
        checks++;
        if (n_lit < 800 * 600) failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
