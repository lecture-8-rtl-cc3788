// alu: the E-stage ALU of the 12-bit processor.
//
// op[4] = 1 selects the Boolean unit (10-1F), op[4:3] = 01 the shifter
// (08-0F), op[4:3] = 00 the arithmetic unit (00-07). The result drives the
// condition flags: neg = result bit 11, zero = result is zero, carry = carry
// out of the arithmetic unit or the bit lost by a shift (0 for Boolean ops).
// Combinational; the core latches the flags into its condition-code register
// at the end of E for ALU instructions only.
// Opcode groups and the three flag names follow the instruction set; the
// carry of shift and Boolean operations is this design's choice.
module alu
  import cpu183_pkg::*;
#(
  parameter int W = 12
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [4:0]   op,
  output logic [W-1:0] y,
  output flags_t       flags
);
  logic [W-1:0] y_ar, y_sh, y_bo;
  logic         c_ar, c_sh;

  arith_unit   #(.W(W)) u_arith (.a(a), .b(b), .op(op[2:0]), .y(y_ar), .cout(c_ar));
  shift_unit   #(.W(W)) u_shift (.a(a), .op0(op[0]), .y(y_sh), .cout(c_sh));
  boolean_unit #(.W(W)) u_bool  (.a(a), .b(b), .op(op[3:0]), .y(y_bo));

  always_comb begin
    if (op[4]) begin
      y           = y_bo;
      flags.carry = 1'b0;
    end else if (op[3]) begin
      y           = y_sh;
      flags.carry = c_sh;
    end else begin
      y           = y_ar;
      flags.carry = c_ar;
    end
    flags.neg  = y[W-1];
    flags.zero = (y == '0);
  end
endmodule
