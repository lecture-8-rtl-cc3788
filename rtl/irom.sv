// irom: instruction memory, 2**AW words of IW bits, an FPGA block RAM.
//
// Port 1 (fetch) reads synchronously: the word at addr appears on instr
// after the next rising edge, so the RAM's output register is the pipeline
// register between the I and R stages. Port 2 (prog_*) writes a program word
// on a rising edge; it loads the program while the core is held in reset.
// If INIT_FILE names a hex file the memory starts from it, otherwise every
// word starts as 0x0000, the NOP encoding (JF.TRUE 0).
// The depth follows from the 8-bit jump address; the load port and the NOP
// fill are this design's choices.
module irom #(
  parameter int    AW        = 8,
  parameter int    IW        = 16,
  parameter string INIT_FILE = ""
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [IW-1:0] instr,
  input  logic          prog_we,
  input  logic [AW-1:0] prog_addr,
  input  logic [IW-1:0] prog_data
);
  logic [IW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
    instr <= mem[addr];
  end
endmodule
