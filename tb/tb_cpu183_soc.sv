// tb_cpu183_soc: end-to-end run of the whole system at its default
// parameters. A program is loaded through the program port while reset is
// held, then runs:
//   - builds the I/O addresses FFF/FFE/FFD with ONES and DECA (forwarding
//     from W), sums 16..1 in a loop closed by JF.NEGZERO (flag bypass from
//     the ALU instruction in E, taken and not-taken jumps, delay slot NOP,
//     forwarding from the previous write-back),
//   - stores the sum to data memory and loads it back, uses the loaded value
//     in the next instruction,
//   - writes the VGA address register and the frame buffer, reads the frame
//     buffer back through the data port,
//   - clears the free-running counter and runs one EXT timing loop
//     (spin until ext[0] rises, then until it falls): with the default tap
//     (bit 20) this takes 2**21 cycles from the counter clear.
// The frame buffer is a testbench model with one-clock read latency.
// Every mechanism is counted and must have happened at least once.
module tb_cpu183_soc;
  import cpu183_pkg::*;

  logic clk = 0, rst = 1;
  logic prog_we = 0;
  pc_t prog_addr = 0;
  instr_t prog_data = 0;
  word_t vga_addr, vga_wdata, vga_rdata;
  logic vga_we;
  pc_t pc;
  logic wb_we;
  reg_t wb_wc;
  word_t wb_data;
  word_t fb [4096];
  instr_t prog [32];
  int checks = 0, failures = 0;
  longint cycle = 0, clr_cycle = -1, done_cycle = -1;
  int n_fwd_w = 0, n_fwd_p = 0, n_taken = 0, n_not_taken = 0, n_flag_bypass = 0;
  int n_dram_ld = 0, n_dram_st = 0, n_vaddr_st = 0, n_vga_st = 0, n_vga_ld = 0;
  int n_cnt_clr = 0, n_ext_spin = 0, n_lit = 0;

  cpu183_soc dut (.clk, .rst, .prog_we, .prog_addr, .prog_data,
                  .vga_addr, .vga_we, .vga_wdata, .vga_rdata,
                  .pc, .wb_we, .wb_wc, .wb_data);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (vga_we) fb[vga_addr] <= vga_wdata;
    vga_rdata <= fb[vga_addr];
  end

  // mechanism counters
  always @(posedge clk) if (!rst) begin
    cycle++;
    if (dut.u_core.e_ctl.valid) begin
      if (dut.u_core.sel_a == FWD_W    || dut.u_core.sel_b == FWD_W)    n_fwd_w++;
      if (dut.u_core.sel_a == FWD_PREV || dut.u_core.sel_b == FWD_PREV) n_fwd_p++;
    end
    if (dut.u_core.r_ctl.valid && dut.instr[15:14] == 2'b00 && dut.instr[13:12] != 2'b10
        && dut.instr != INSTR_NOP) begin
      if (dut.u_core.take) n_taken++; else n_not_taken++;
      if (dut.instr[11] == 1'b0 && dut.instr[11:8] != COND_TRUE && dut.u_core.e_ctl.valid
          && dut.u_core.e_ctl.alu) n_flag_bypass++;
      if (dut.instr[11] == 1'b1 && dut.u_core.take) n_ext_spin++;
    end
    if (dut.u_dram.we) n_dram_st++;
    if (dut.u_core.dreq.re && dut.u_map.is_dram) n_dram_ld++;
    if (dut.u_core.dreq.we && dut.u_map.is_vaddr) n_vaddr_st++;
    if (vga_we) n_vga_st++;
    if (dut.u_core.dreq.re && dut.u_map.is_vdata) n_vga_ld++;
    if (dut.u_map.cnt_clr) begin n_cnt_clr++; clr_cycle = cycle; end
    if (wb_we && dut.u_core.w_ctl.wbsel == WB_LIT) n_lit++;
    if (wb_we && wb_wc == 3'd4 && wb_data == 12'h077 && done_cycle < 0) done_cycle = cycle;
  end

  task automatic expect_eq(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL %s never happened", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (fb[i]) fb[i] = 0;
    fb[12'h124] = 12'h5A5;
    foreach (prog[i]) prog[i] = INSTR_NOP;
    prog[8'h00] = enc_alu(OP_ONES, 3'd7, 3'd0, 3'd0);      // R7 = FFF
    prog[8'h01] = enc_alu(OP_DECA, 3'd6, 3'd7, 3'd0);      // R6 = FFE
    prog[8'h02] = enc_alu(OP_DECA, 3'd5, 3'd6, 3'd0);      // R5 = FFD
    prog[8'h03] = enc_alu(OP_ZEROS, 3'd0, 3'd0, 3'd0);     // R0 = 0
    prog[8'h04] = enc_lit(3'd1, 11'd16);                   // R1 = 16
    prog[8'h05] = enc_alu(OP_ADD, 3'd0, 3'd0, 3'd1);       // loop: R0 += R1
    prog[8'h06] = enc_alu(OP_DECA, 3'd1, 3'd1, 3'd0);      // R1--
    prog[8'h07] = enc_jmp(JOP_JF, COND_NEGZERO, 8'h05);    // until R1 <= 0
    prog[8'h08] = INSTR_NOP;                               // delay slot
    prog[8'h09] = enc_store(3'd1, 3'd0);                   // mem[0] = R0
    prog[8'h0A] = enc_load(3'd2, 3'd1);                    // R2 = mem[0]
    prog[8'h0B] = enc_alu(OP_INCA, 3'd3, 3'd2, 3'd0);      // R3 = R2 + 1
    prog[8'h0C] = enc_lit(3'd4, 11'h123);
    prog[8'h0D] = enc_store(3'd6, 3'd4);                   // VGA address = 123
    prog[8'h0E] = enc_store(3'd7, 3'd3);                   // fb[123] = R3
    prog[8'h0F] = enc_lit(3'd4, 11'h124);
    prog[8'h10] = enc_store(3'd6, 3'd4);                   // VGA address = 124
    prog[8'h11] = enc_load(3'd2, 3'd7);                    // R2 = fb[124]
    prog[8'h12] = enc_store(3'd5, 3'd0);                   // clear counter
    prog[8'h13] = enc_jmp(JOP_JF, COND_EXT, 8'h13);        // spin until EXT = 1
    prog[8'h14] = INSTR_NOP;
    prog[8'h15] = enc_jmp(JOP_JT, COND_EXT, 8'h15);        // spin until EXT = 0
    prog[8'h16] = INSTR_NOP;
    prog[8'h17] = enc_lit(3'd4, 11'h077);                  // done marker
    prog[8'h18] = enc_jmp(JOP_J, COND_TRUE, 8'h18);        // halt loop
    prog[8'h19] = INSTR_NOP;

    // load the program with the core in reset
    repeat (2) @(posedge clk);
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 8'(i); prog_data = prog[i];
    end
    @(negedge clk) prog_we = 0;
    @(posedge clk); #1 rst = 0;

    wait (done_cycle >= 0);
    repeat (20) @(posedge clk);
    #1;
    expect_eq("R0 sum", dut.u_core.u_rf.regs[0], 12'd136);
    expect_eq("R1", dut.u_core.u_rf.regs[1], 12'd0);
    expect_eq("R2 frame-buffer load", dut.u_core.u_rf.regs[2], 12'h5A5);
    expect_eq("R3 load + 1", dut.u_core.u_rf.regs[3], 12'd137);
    expect_eq("R4", dut.u_core.u_rf.regs[4], 12'h077);
    expect_eq("R5", dut.u_core.u_rf.regs[5], 12'hFFD);
    expect_eq("R6", dut.u_core.u_rf.regs[6], 12'hFFE);
    expect_eq("R7", dut.u_core.u_rf.regs[7], 12'hFFF);
    expect_eq("data memory[0]", dut.u_dram.mem[0], 12'd136);
    expect_eq("frame buffer[123]", fb[12'h123], 12'd137);
    checks++;
    if (pc != 8'h18 && pc != 8'h19 && pc != 8'h1A) begin failures++; $display("FAIL pc %h not in halt loop", pc); end
    // EXT timing loop: ext[0] = counter bit 20 rises 2**20 cycles after the
    // clear and falls 2**20 later; the marker is written a few cycles after.
    checks++;
    if (done_cycle - clr_cycle < (1 << 21) || done_cycle - clr_cycle > (1 << 21) + 16) begin
      failures++; $display("FAIL timing loop took %0d cycles", done_cycle - clr_cycle);
    end
    $display("timing loop: %0d cycles from counter clear to marker", done_cycle - clr_cycle);
    expect_seen("forward from W", n_fwd_w);
    expect_seen("forward from previous WB", n_fwd_p);
    expect_seen("jump taken", n_taken);
    expect_seen("jump not taken", n_not_taken);
    expect_seen("flag bypass E->R", n_flag_bypass);
    expect_seen("data memory store", n_dram_st);
    expect_seen("data memory load", n_dram_ld);
    expect_seen("VGA address store", n_vaddr_st);
    expect_seen("VGA data store", n_vga_st);
    expect_seen("VGA data load", n_vga_ld);
    expect_seen("counter clear", n_cnt_clr);
    expect_seen("EXT spin jump", n_ext_spin);
    expect_seen("literal load", n_lit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
