// regfile: the general-purpose register file, N words of W bits.
//
// Two read ports (A and B) are combinational and are used in the R stage;
// the single write port (C) writes on the rising clock edge at the end of
// the W stage. A value written in a cycle is not visible on the read ports
// until the next cycle; the core's forwarding unit covers that cycle.
// Reset clears every register.
// Eight registers of 12 bits and the R-read / W-write split follow the
// processor description; the reset clear and no write-through are this
// design's choices.
module regfile #(
  parameter int W = 12,
  parameter int N = 8,
  localparam int AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] ra,
  input  logic [AW-1:0] rb,
  output logic [W-1:0]  da,
  output logic [W-1:0]  db,
  input  logic          we,
  input  logic [AW-1:0] wc,
  input  logic [W-1:0]  dc
);
  logic [W-1:0] regs [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wc] <= dc;
    end
  end

  assign da = regs[ra];
  assign db = regs[rb];
endmodule
