// tb_serial_sender: checks the 23-bit LSB-first record on the data wire.
//
// The testbench makes its own tick every 9 clocks and a frame pulse at a
// random point between ticks. At the first tick after the frame, frame_out
// must rise with bit 0 on 'data'; the next 22 ticks must carry the rest of
// {y, x, colour}; after that data stays 0 and 'sending' falls.
module tb_serial_sender;
  logic clk = 0, rst = 1;
  logic tick = 0, frame = 0;
  logic [1:0] ci = 0;
  logic [10:0] x = 0;
  logic [9:0] y = 0;
  logic data, frame_out, sending;
  int checks = 0, failures = 0;

  serial_sender dut (.clk, .rst, .tick, .frame, .color_index(ci), .x_coord(x), .y_coord(y),
                     .data, .frame_out, .sending);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_tick();
    repeat (8) @(negedge clk);
    tick = 1;
    @(negedge clk) tick = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    do_tick();
    for (int r = 0; r < 25; r++) begin
      logic [22:0] rec;
      ci = 2'($urandom); x = 11'($urandom); y = 10'($urandom);
      rec = {y, x, ci};
      repeat ($urandom_range(1, 6)) @(negedge clk);
      frame = 1;
      @(negedge clk) frame = 0;
      checks++;
      if (frame_out !== 1'b0) failures++;   // waits for the tick
      for (int b = 0; b < 23; b++) begin
        do_tick();
        if (b == 1) begin x = ~x; y = ~y; ci = ~ci; end  // captured: later changes must not matter
        checks++;
        if (data !== rec[b] || frame_out !== (b == 0) || sending !== (b < 22)) begin
          failures++;
          $display("rec %0d bit %0d: data=%b exp %b frame_out=%b", r, b, data, rec[b], frame_out);
        end
      end
      do_tick();
      checks++;
      if (data !== 1'b0 || sending !== 1'b0) failures++;
      repeat ($urandom_range(0, 2)) do_tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
