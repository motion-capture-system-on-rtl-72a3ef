// tb_memory_controller: checks clear, depth-tested writes and display reads.
//
// A reduced screen (8 words x 4 rows) and the ZBT model are used. After
// reset the controller must clear every word to two far, black pixels, then
// wait for a vertical sync and draw_en. Random pixels, many aimed at the same
// few words, are offered through the valid/ready handshake; a reference copy
// of the memory applies the depth test (a pixel is kept only if nearer than
// the stored one) and must match the ZBT contents at the end, as must the
// written/rejected counts. Each pixel must take RD_LAT+2 = 4 clocks. With
// all_drawn the controller must switch to read mode and drive the display
// address; redraw must clear the memory again.
module tb_memory_controller;
  import mocap_pkg::*;
  localparam int HW = 8, VA = 4;
  logic clk = 0, rst = 1, vsync = 0, draw_en = 0, redraw = 0, all_drawn = 0;
  logic pix_valid = 0, pix_ready, pix_sel = 0, read_mode, zbt_we;
  logic [18:0] pix_addr = 0, disp_addr = 0, zbt_addr;
  pix_word_t pix_word = '0;
  logic [35:0] zbt_wdata, zbt_rdata;
  logic [31:0] n_written, n_rejected;
  logic [35:0] ref_mem [int];
  int checks = 0, failures = 0, exp_w = 0, exp_r = 0;
  localparam logic [17:0] FAR = 18'h007FF;

  memory_controller #(.H_WORDS(HW), .V_ACTIVE(VA)) dut (
    .clk, .rst, .vsync, .draw_en, .redraw, .all_drawn, .pix_valid, .pix_ready, .pix_addr,
    .pix_sel, .pix_word, .disp_addr, .read_mode, .zbt_addr, .zbt_we, .zbt_wdata, .zbt_rdata,
    .n_written, .n_rejected);
  zbt_sram_model zbt (.clk, .addr(zbt_addr), .we(zbt_we), .wdata(zbt_wdata), .rdata(zbt_rdata));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_clear();
    for (int r = 0; r < VA; r++)
      for (int c = 0; c < HW; c++) begin
        checks++;
        if (zbt.mem[r * 512 + c] !== {FAR, FAR}) failures++;
      end
  endtask

  initial begin
    // memory starts with garbage
    for (int a = 0; a < VA * 512; a++) zbt.mem[a] = {4'($urandom), 32'($urandom)};
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    draw_en = 1;
    repeat (HW * VA + 5) @(negedge clk);
    check_clear();
    // no writes before a vertical sync
    pix_valid = 1;
    repeat (10) @(negedge clk);
    checks++;
    if (pix_ready) failures++;
    vsync = 1;
    @(negedge clk) vsync = 0;
    for (int r = 0; r < VA; r++) for (int c = 0; c < HW; c++) ref_mem[r * 512 + c] = {FAR, FAR};
    for (int i = 0; i < 400; i++) begin
      int r, c, t0;
      logic [17:0] old;
      r = $urandom_range(0, 1); c = $urandom_range(0, 3);
      pix_addr = 19'(r * 512 + c);
      pix_sel  = 1'($urandom);
      pix_word = '{zero: 1'b0, color: 2'($urandom), shade: 4'($urandom), depth: 11'($urandom_range(0, 2046))};
      pix_valid = 1;
      t0 = 0;
      while (!pix_ready) begin @(negedge clk); t0++; end
      if (i > 0) begin
        checks++;
        if (t0 != 3) begin failures++; $display("pixel %0d waited %0d", i, t0); end
      end
      old = pix_sel ? ref_mem[r * 512 + c][35:18] : ref_mem[r * 512 + c][17:0];
      if (pix_word.depth < old[10:0]) begin
        exp_w++;
        if (pix_sel) ref_mem[r * 512 + c][35:18] = pix_word;
        else         ref_mem[r * 512 + c][17:0]  = pix_word;
      end else exp_r++;
      @(negedge clk);
    end
    pix_valid = 0;
    repeat (6) @(negedge clk);
    for (int r = 0; r < VA; r++)
      for (int c = 0; c < HW; c++) begin
        checks++;
        if (zbt.mem[r * 512 + c] !== ref_mem[r * 512 + c]) failures++;
      end
    checks++;
    if (n_written != 32'(exp_w) || n_rejected != 32'(exp_r) || exp_r == 0) failures++;
    // read mode
    all_drawn = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (!read_mode) failures++;
    for (int i = 0; i < 20; i++) begin
      disp_addr = 19'($urandom);
      #1;
      checks++;
      if (zbt_addr !== disp_addr || zbt_we) failures++;
      @(negedge clk);
    end
    // redraw clears again
    all_drawn = 0;
    redraw = 1;
    @(negedge clk) redraw = 0;
    repeat (HW * VA + 5) @(negedge clk);
    checks++;
    if (read_mode) failures++;
    check_clear();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
