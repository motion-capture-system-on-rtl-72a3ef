// tb_serial_receiver: checks record reassembly from the three link wires.
//
// The testbench plays the sending side: an interface clock of a random
// period (8 to 40 system clocks), frame high for the first bit, data changed
// at each rising edge, LSB first. Every record must appear on the outputs
// with one 'valid' strobe; a burst of data without a frame must be ignored.
module tb_serial_receiver;
  logic clk = 0, rst = 1;
  logic if_clk = 0, frame = 0, data = 0;
  logic [1:0] ci;
  logic [10:0] x;
  logic [9:0] y;
  logic valid;
  int checks = 0, failures = 0, n_valid = 0, half;

  serial_receiver dut (.clk, .rst, .if_clk, .frame, .data, .color_index(ci), .x_coord(x),
                       .y_coord(y), .valid);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && valid) n_valid++;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bit_out(input logic f, input logic d);
    @(negedge clk) begin if_clk = 1; frame = f; data = d; end
    repeat (half - 1) @(negedge clk);
    @(negedge clk) if_clk = 0;
    repeat (half - 1) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    half = 4;
    // data without a frame: no record
    for (int b = 0; b < 30; b++) bit_out(0, 1'($urandom));
    repeat (10) @(negedge clk);
    checks++;
    if (n_valid != 0) failures++;
    for (int r = 0; r < 30; r++) begin
      logic [22:0] rec;
      int n_before;
      half = $urandom_range(4, 20);
      rec = 23'($urandom);
      n_before = n_valid;
      for (int b = 0; b < 23; b++) bit_out(b == 0, rec[b]);
      repeat (4) @(negedge clk);
      checks++;
      if (n_valid != n_before + 1 || {y, x, ci} !== rec) begin
        failures++;
        $display("rec %0d: got %h exp %h valid %0d", r, {y, x, ci}, rec, n_valid - n_before);
      end
      repeat ($urandom_range(0, 3)) bit_out(0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
