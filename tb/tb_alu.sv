// tb_alu: checks result and flags of all 26 listed ALU opcodes against the
// instruction-level reference model.
module tb_alu;
  import cpu183_pkg::*;
  import cpu183_ref_pkg::*;
  logic [11:0] a, b, y;
  logic [4:0]  op;
  flags_t      flags;
  int checks = 0, failures = 0;
  logic [4:0] ops [26] = '{5'h00,5'h01,5'h02,5'h03,5'h04,5'h05,5'h06,5'h07,5'h08,5'h09,
                           5'h10,5'h11,5'h12,5'h13,5'h14,5'h15,5'h16,5'h17,5'h18,5'h19,
                           5'h1A,5'h1B,5'h1C,5'h1D,5'h1E,5'h1F};

  alu #(.W(12)) dut (.a, .b, .op, .y, .flags);

  task automatic check(logic [11:0] ta, logic [11:0] tb_, logic [4:0] top);
    ref_res_t r;
    a = ta; b = tb_; op = top; #1;
    r = ref_alu(ta, tb_, top);
    checks++;
    if (y !== r.y || flags.neg !== r.neg || flags.zero !== r.zero || flags.carry !== r.carry) begin
      failures++;
      $display("FAIL op=%h a=%h b=%h got %h nzc=%b%b%b exp %h nzc=%b%b%b", top, ta, tb_,
               y, flags.neg, flags.zero, flags.carry, r.y, r.neg, r.zero, r.carry);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ops[k]) begin
      check(12'h000, 12'h000, ops[k]);
      check(12'h005, 12'h005, ops[k]);
      check(12'hFFF, 12'h001, ops[k]);
      check(12'h800, 12'h001, ops[k]);
      for (int i = 0; i < 100; i++) check(12'($urandom), 12'($urandom), ops[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
