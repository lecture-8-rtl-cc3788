// ext_counter: free-running counter that drives the external jump conditions.
//
// A CW-bit counter increments every clock. Its bits TAP..TAP+7 are the eight
// external conditions; ext[0] is the one tested by JF.EXT / JT.EXT, so a
// program can spin on it to pace a timing loop. clr (a store to the counter's
// memory-mapped address) and rst set the count to zero.
// A free-running counter on EXT with an optional memory-mapped reset follows
// the processor's I/O description; width and tap position are this design's
// choices (TAP = 20 toggles ext[0] every 2**20 cycles, about 42 ms at 25 MHz).
module ext_counter #(
  parameter int CW  = 24,
  parameter int TAP = 20
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       clr,
  output logic [7:0] ext
);
  logic [CW-1:0] count;
  logic [CW+7:0] padded;

  always_ff @(posedge clk) begin
    if (rst || clr) count <= '0;
    else            count <= count + 1'b1;
  end

  assign padded = {8'h00, count};
  assign ext    = padded[TAP +: 8];
endmodule
