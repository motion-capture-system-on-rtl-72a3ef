// tb_pixel_buffer: checks the FIFO against a queue model.
//
// Random pushes and pops, with phases where the reader stops so the buffer
// fills and phases where the writer stops so it empties. Every word must come
// out once, in order; 'full' and in_ready must agree with the model's fill.
module tb_pixel_buffer;
  logic clk = 0, rst = 1, in_valid = 0, out_ready = 0, in_ready, out_valid, full;
  logic [37:0] in_data = 0, out_data;
  logic [37:0] q [$];
  int checks = 0, failures = 0, n_full = 0, n_out = 0;

  pixel_buffer dut (.clk, .rst, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data, .full);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 6000; i++) begin
      int phase;
      phase = (i / 300) % 3;
      @(negedge clk);
      in_valid  = (phase == 2) ? 1'b0 : 1'($urandom);
      out_ready = (phase == 1) ? 1'b0 : 1'($urandom);
      in_data   = {6'($urandom), 32'($urandom)};
      #1;
      checks++;
      if (full !== (q.size() == 16) || in_ready !== (q.size() < 16) || out_valid !== (q.size() > 0))
        failures++;
      if (full) n_full++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== q.pop_front()) failures++;
        n_out++;
      end
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++;
    if (n_full == 0 || n_out < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
