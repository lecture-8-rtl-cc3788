// pc_unit: the program counter of the I stage.
//
// Every cycle the PC advances by one, unless the control unit in R takes a
// jump, in which case it loads the jump target. The PC drives the
// instruction memory address directly. Because the decision is made while
// the jump is in R, the instruction fetched in that same cycle (the one after
// the jump) still executes: one delay slot. Synchronous reset to address 0.
// The PC-to-IROM path and the control-unit feedback follow the processor's
// block diagram; the reset address is this design's choice.
module pc_unit #(
  parameter int AW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          take,
  input  logic [AW-1:0] target,
  output logic [AW-1:0] pc
);
  always_ff @(posedge clk) begin
    if (rst)       pc <= '0;
    else if (take) pc <= target;
    else           pc <= pc + 1'b1;
  end
endmodule
