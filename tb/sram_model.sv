// sram_model: behavioural model of the board SRAM for simulation only.
//
// A synchronous memory of 2**AW words: when en is high at a clock edge a
// write stores wdata at addr, and a read returns the word at addr on rdata
// LATENCY cycles later (rdata keeps its value otherwise). Contents start
// at zero. It stands in for the external SRAM chip, whose timing is not
// modelled beyond this fixed read latency.
module sram_model #(
  parameter int unsigned AW      = 19,
  parameter int unsigned DW      = 32,
  parameter int unsigned LATENCY = 2
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];
  logic [DW-1:0] pipe [LATENCY];

  initial begin
    for (int k = 0; k < 2**AW; k++) mem[k] = '0;
    for (int k = 0; k < LATENCY; k++) pipe[k] = '0;
  end

  always_ff @(posedge clk) begin
    if (en && we) mem[addr] <= wdata;
    pipe[0] <= (en && !we) ? mem[addr] : pipe[0];
    for (int k = 1; k < LATENCY; k++) pipe[k] <= pipe[k-1];
  end

  assign rdata = pipe[LATENCY-1];
endmodule
