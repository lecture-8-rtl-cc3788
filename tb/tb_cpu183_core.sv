// tb_cpu183_core: runs programs on the pipelined core and compares every
// register write, in order and in timing, with the instruction-level
// reference model.
//   1. A summing loop (16 + 15 + ... + 1) with a NOP in the jump delay slot:
//      R0 must end at 136; one instruction completes per cycle and the first
//      write appears three clocks after reset is released (4 stages).
//   2. Random programs of ALU, literal, load, store and conditional jumps
//      (jump targets random, delay slots random) to exercise forwarding from
//      W and from the previous write-back, the flag bypass to R and loads.
// Instruction and data memories are testbench models with the same one-clock
// synchronous read as the block RAMs; the data memory is flat (no I/O).
module tb_cpu183_core;
  import cpu183_pkg::*;
  import cpu183_ref_pkg::*;

  logic clk = 0, rst = 1;
  pc_t imem_addr;
  instr_t imem_instr;
  dreq_t dreq;
  word_t drdata;
  logic [7:0] ext = 0;
  logic wb_we;
  reg_t wb_wc;
  word_t wb_data;
  instr_t imem [256];
  word_t dmem [256];
  int checks = 0, failures = 0;
  int cycle, nwrites, first_cycle;
  int n_fwd_w, n_fwd_p, n_taken_rtl;
  cpu183_iss iss;

  cpu183_core dut (.clk, .rst, .imem_addr, .imem_instr, .dreq, .drdata, .ext, .wb_we, .wb_wc, .wb_data);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    imem_instr <= imem[imem_addr];
    if (dreq.we) dmem[dreq.addr[7:0]] <= dreq.wdata;
    drdata <= dmem[dreq.addr[7:0]];
  end

  // compare writes against the reference trace
  always @(posedge clk) if (!rst) begin
    if (wb_we) begin
      checks++;
      if (nwrites >= iss.trace.size()) begin
        failures++; $display("FAIL extra write r%0d=%h", wb_wc, wb_data);
      end else begin
        if ({wb_wc, wb_data} !== iss.trace[nwrites]) begin
          failures++;
          if (failures < 10) $display("FAIL write %0d: r%0d=%h exp r%0d=%h", nwrites, wb_wc, wb_data,
                                      iss.trace[nwrites][14:12], iss.trace[nwrites][11:0]);
        end
        if (nwrites == 0) first_cycle = cycle;
        // one instruction per cycle: write k happens at first_cycle + program index
        checks++;
        if (cycle - first_cycle != iss.trace_step[nwrites] - iss.trace_step[0]) begin
          failures++;
          if (failures < 10) $display("FAIL timing write %0d at cycle %0d", nwrites, cycle);
        end
      end
      nwrites++;
    end
    if (dut.e_ctl.valid && dut.sel_a == FWD_W || dut.e_ctl.valid && dut.sel_b == FWD_W) n_fwd_w++;
    if (dut.e_ctl.valid && dut.sel_a == FWD_PREV || dut.e_ctl.valid && dut.sel_b == FWD_PREV) n_fwd_p++;
    if (dut.take) n_taken_rtl++;
    cycle++;
  end

  task automatic run(int ncycles);
    iss.reset();
    iss.mmio = 0;
    foreach (imem[i]) iss.imem[i] = imem[i];
    for (int i = 0; i < ncycles + 10; i++) iss.step();
    rst = 1;
    repeat (3) @(posedge clk);
    // cleared after reset so that no store of the previous program lands late
    foreach (dmem[i]) dmem[i] = 0;
    nwrites = 0; cycle = 0; first_cycle = -1;
    #1 rst = 0;
    repeat (ncycles) @(posedge clk);
    #1;
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iss = new();
    n_fwd_w = 0; n_fwd_p = 0; n_taken_rtl = 0;
    // ---- 1. summing loop
    foreach (imem[i]) imem[i] = INSTR_NOP;
    imem[0] = enc_alu(OP_ZEROS, 3'd0, 3'd0, 3'd0);
    imem[1] = enc_lit(3'd1, 11'd16);
    imem[2] = enc_alu(OP_ADD, 3'd0, 3'd0, 3'd1);
    imem[3] = enc_alu(OP_DECA, 3'd1, 3'd1, 3'd0);
    imem[4] = enc_jmp(JOP_JF, COND_NEGZERO, 8'd2);
    imem[5] = INSTR_NOP;
    imem[6] = enc_jmp(JOP_JT, COND_TRUE, 8'd6);
    imem[7] = INSTR_NOP;
    run(120);
    checks++;
    if (dut.u_rf.regs[0] !== 12'd136 || dut.u_rf.regs[1] !== 12'd0) begin
      failures++; $display("FAIL sum R0=%0d R1=%0d", dut.u_rf.regs[0], dut.u_rf.regs[1]);
    end
    checks++;
    if (first_cycle != 3) begin failures++; $display("FAIL first write at cycle %0d", first_cycle); end
    checks++;
    if (nwrites != 2 + 2 * 16) begin failures++; $display("FAIL write count %0d", nwrites); end

    // ---- 2. random programs
    for (int p = 0; p < 40; p++) begin
      for (int i = 0; i < 256; i++) begin
        int k;
        k = $urandom % 20;
        if (k < 11)       imem[i] = enc_alu(5'($urandom), 3'($urandom), 3'($urandom), 3'($urandom));
        else if (k < 14)  imem[i] = enc_lit(3'($urandom), 11'($urandom));
        else if (k < 16)  imem[i] = enc_load(3'($urandom), 3'($urandom));
        else if (k < 18)  imem[i] = enc_store(3'($urandom), 3'($urandom));
        else begin
          logic [3:0] c;
          c = 4'($urandom % 8);
          imem[i] = enc_jmp(jop_e'($urandom % 3), c, 8'($urandom));
        end
      end
      run(400);
      checks++;
      if (nwrites < 100) begin failures++; $display("FAIL program %0d only %0d writes", p, nwrites); end
    end
    // the mechanisms must all have happened
    checks++; if (n_fwd_w == 0) begin failures++; $display("FAIL no forwarding from W"); end
    checks++; if (n_fwd_p == 0) begin failures++; $display("FAIL no forwarding from previous write-back"); end
    checks++; if (n_taken_rtl == 0) begin failures++; $display("FAIL no jump taken"); end
    $display("forward W=%0d prev=%0d taken=%0d", n_fwd_w, n_fwd_p, n_taken_rtl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
