// tb_point_detect: checks the red colour matcher against a reference model.
//
// Random pixels, biased towards the red hue, saturation and value limits
// and the detection window edges, are fed one per clock; the expected match
// (strict compares, wrapping hue) is computed here and compared with the
// registered output one clock later, together with the passed coordinates.
module tb_point_detect;
  logic clk = 0, rst = 1;
  logic [7:0] h = 0, s = 0, v = 0;
  logic [10:0] hc = 0;
  logic [9:0] vc = 0;
  logic match;
  logic [10:0] xo;
  logic [9:0] yo;
  int checks = 0, failures = 0, hits = 0;

  point_detect dut (.clk, .rst, .h, .s, .v, .hcount(hc), .vcount(vc), .match, .x_out(xo), .y_out(yo));

  always #5 clk = ~clk;

  function automatic logic [7:0] pick(input logic [7:0] edge_v);
    int sel;
    sel = $urandom_range(3);
    case (sel)
      0: return edge_v;
      1: return edge_v + 8'd1;
      2: return edge_v - 8'd1;
      default: return 8'($urandom);
    endcase
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_m;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      h  = ($urandom_range(1)) ? pick(8'hFA) : pick(8'h01);
      s  = pick(8'hF5);
      v  = pick(8'hB6);
      hc = ($urandom_range(1)) ? 11'($urandom_range(60, 740)) : (($urandom_range(1)) ? 11'd80 : 11'd717);
      vc = ($urandom_range(1)) ? 10'($urandom_range(90, 560)) : (($urandom_range(1)) ? 10'd108 : 10'd542);
      exp_m = (hc > 80) && (hc < 717) && (vc > 108) && (vc < 542) &&
              (h > 8'hFA || h < 8'h01) && (s > 8'hF5) && (v > 8'hB6);
      @(posedge clk); #1;
      checks++;
      if (match !== exp_m || xo !== hc || yo !== vc) begin
        failures++;
        if (failures < 10) $display("mismatch h=%h s=%h v=%h x=%0d y=%0d got %b exp %b", h, s, v, hc, vc, match, exp_m);
      end
      if (exp_m) hits++;
    end
    checks++;
    if (hits < 20) failures++;
    $display("hits=%0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
