// tb_cntrl: decode and jump resolution of the R-stage control unit.
// Uses the assembled words of a short sample program (ZEROS, LOADLIT, ADD,
// DECA, JF.NEGZERO, JT.TRUE, NOP) plus every jump/condition/flag combination.
module tb_cntrl;
  import cpu183_pkg::*;
  instr_t instr;
  logic valid;
  flags_t flags;
  logic [7:0] ext;
  ctl_t ctl;
  logic take;
  pc_t target;
  int checks = 0, failures = 0;

  cntrl dut (.instr, .valid, .flags, .ext, .ctl, .take, .target);

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s instr=%h got %b exp %b", what, instr, got, exp); end
  endtask

  function automatic logic cond_val(logic [3:0] c, flags_t f, logic [7:0] e);
    if (c[3]) return e[c[2:0]];
    case (c)
      4'b0000: return 1'b1;
      4'b0100: return f.neg;
      4'b0101: return f.zero;
      4'b0110: return f.carry;
      4'b0111: return f.neg | f.zero;
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = 1; flags = '0; ext = 0;
    // ZEROS R0 (0x4400)
    instr = 16'h4400; #1;
    expect_bit("zeros.alu", ctl.alu, 1); expect_bit("zeros.we", ctl.we, 1);
    checks++; if (ctl.op !== 5'h10 || ctl.wc !== 0) failures++;
    // LOADLIT R1,16 (0x8810)
    instr = 16'h8810; #1;
    expect_bit("lit.we", ctl.we, 1); expect_bit("lit.alu", ctl.alu, 0);
    checks++; if (ctl.wbsel !== WB_LIT || ctl.lit !== 12'd16 || ctl.wc !== 1) failures++;
    // LOADLIT with all literal bits set: zero-extended 11 bits
    instr = enc_lit(3'd5, 11'h7FF); #1;
    checks++; if (ctl.lit !== 12'h7FF || ctl.wc !== 5) failures++;
    // ADD R0,R0,R1 (0x4001)
    instr = 16'h4001; #1;
    checks++; if (ctl.op !== 5'h00 || ctl.ra !== 0 || ctl.rb !== 1 || ctl.wc !== 0 || !ctl.alu) failures++;
    // DECA R1,R1 (0x4988)
    instr = 16'h4988; #1;
    checks++; if (ctl.op !== 5'h06 || ctl.ra !== 1 || ctl.wc !== 1) failures++;
    // JF.NEGZERO 02 (0x0702)
    instr = 16'h0702; flags = '{neg:0, zero:0, carry:1}; #1;
    expect_bit("jfnz.take", take, 1); checks++; if (target !== 8'h02) failures++;
    expect_bit("jfnz.we", ctl.we, 0);
    flags = '{neg:0, zero:1, carry:0}; #1; expect_bit("jfnz.take2", take, 0);
    // JT.TRUE 05 (0x1005)
    instr = 16'h1005; flags = '0; #1;
    expect_bit("jt.true", take, 1); checks++; if (target !== 8'h05) failures++;
    // NOP
    instr = 16'h0000; #1;
    expect_bit("nop.take", take, 0); expect_bit("nop.we", ctl.we, 0);
    // LOAD and STORE
    instr = enc_load(3'd3, 3'd6); #1;
    expect_bit("ld.load", ctl.load, 1); expect_bit("ld.we", ctl.we, 1); expect_bit("ld.alu", ctl.alu, 0);
    checks++; if (ctl.wbsel !== WB_MEM || ctl.ra !== 6 || ctl.wc !== 3) failures++;
    instr = enc_store(3'd2, 3'd7); #1;
    expect_bit("st.store", ctl.store, 1); expect_bit("st.we", ctl.we, 0);
    checks++; if (ctl.ra !== 2 || ctl.rb !== 7) failures++;
    // bubble
    valid = 0; instr = 16'h1005; #1;
    expect_bit("bubble.take", take, 0); expect_bit("bubble.valid", ctl.valid, 0);
    instr = 16'h4400; #1; expect_bit("bubble.we", ctl.we, 0);
    valid = 1;
    // all jumps, conditions, flag and ext values
    for (int op = 0; op < 4; op++)
      for (int c = 0; c < 16; c++)
        for (int f = 0; f < 8; f++) begin
          flags = flags_t'(3'(f)); ext = 8'($urandom);
          instr = enc_jmp(jop_e'(op), 4'(c), 8'($urandom)); #1;
          case (op)
            0: expect_bit("jf", take, !cond_val(4'(c), flags, ext));
            1: expect_bit("jt", take, cond_val(4'(c), flags, ext));
            2: expect_bit("j", take, 1'b1);
            default: expect_bit("op11", take, 1'b0);
          endcase
          expect_bit("jmp.we", ctl.we, 0);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
