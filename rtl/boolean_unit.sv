// boolean_unit: the Boolean part of the ALU (opcodes 10-1F).
//
// The low four opcode bits are the truth table of the function applied to
// every bit pair: y[i] = op[{~b[i], ~a[i]}]. So op = 0 gives ZEROS, 1 AND,
// 3 PASSB, 5 PASSA, 6 XOR, 7 OR, 8 NOR, 9 XNOR, E NAND, F ONES and so on,
// which is the instruction table row for row. Combinational.
// The table is the instruction set's; realising it as a lookup is this
// design's implementation.
module boolean_unit #(
  parameter int W = 12
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [3:0]   op,
  output logic [W-1:0] y
);
  always_comb begin
    for (int i = 0; i < W; i++)
      y[i] = op[{~b[i], ~a[i]}];
  end
endmodule
