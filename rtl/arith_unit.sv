// arith_unit: the arithmetic part of the ALU (opcodes 00-07).
//
// All eight arithmetic instructions are one adder, y = a + bsel + cin:
//   op[0]    is the carry in,
//   op[2:1]  picks the second operand: 00 b, 01 zero, 10 ~b, 11 all ones.
// This gives ADD, ADDINC, PASSA, INCA, SUBDEC (a-b-1), SUB, DECA and PASSA
// for op = 0..7, exactly the instruction table. cout is the adder's carry
// out (for subtraction: 1 when no borrow). Purely combinational.
// The opcode meanings follow the instruction set; splitting them into a
// carry-in bit and an operand select is this design's implementation.
module arith_unit #(
  parameter int W = 12
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [2:0]   op,
  output logic [W-1:0] y,
  output logic         cout
);
  logic [W-1:0] bsel;

  always_comb begin
    unique case (op[2:1])
      2'b00:   bsel = b;
      2'b01:   bsel = '0;
      2'b10:   bsel = ~b;
      default: bsel = '1;
    endcase
    {cout, y} = {1'b0, a} + {1'b0, bsel} + {{W{1'b0}}, op[0]};
  end
endmodule
