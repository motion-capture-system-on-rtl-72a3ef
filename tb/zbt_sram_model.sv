// zbt_sram_model: behavioural model of the 512K x 36 ZBT SRAM frame buffer.
//
// Simulation only. A write (we high) stores wdata at addr on the clock edge.
// A read returns the word at addr two clocks after the address is presented,
// the pipelined ZBT read latency this design's memory controller expects.
// The real part also delays write data by two clocks; the controller here
// presents address and data together, so the model stores them together.
module zbt_sram_model #(
  parameter int AW = 19
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [35:0]   wdata,
  output logic [35:0]   rdata
);
  logic [35:0] mem [2**AW];
  logic [35:0] r1;

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    r1    <= mem[addr];
    rdata <= r1;
  end
endmodule
