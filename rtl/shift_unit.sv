// shift_unit: the shift part of the ALU (opcodes 08 LSL and 09 ASR).
//
// op0 = 0: logical shift left by one, a zero enters at bit 0.
// op0 = 1: arithmetic shift right by one, the sign bit is kept.
// cout is the bit shifted out. Combinational.
// The two operations are the instruction set's; the one-bit distance and
// reporting the lost bit as carry are this design's choices.
module shift_unit #(
  parameter int W = 12
) (
  input  logic [W-1:0] a,
  input  logic         op0,
  output logic [W-1:0] y,
  output logic         cout
);
  always_comb begin
    if (op0) begin
      y    = {a[W-1], a[W-1:1]};
      cout = a[0];
    end else begin
      y    = {a[W-2:0], 1'b0};
      cout = a[W-1];
    end
  end
endmodule
