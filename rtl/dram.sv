// dram: the data memory, 2**AW words of W bits, an FPGA block RAM.
//
// Address, write data and write enable are presented in the E stage and
// sampled at the rising edge; the read data of that address appears after
// the edge, in the W stage, where the core selects it as the result of a
// LOAD. A write and a read of the same address in one cycle return the old
// value (read-before-write). Contents start at zero.
// Placing the memory in E with its data used in W follows the processor's
// block diagram; the depth of 256 words is this design's choice.
module dram #(
  parameter int AW = 8,
  parameter int W  = 12
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [2**AW];

  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
