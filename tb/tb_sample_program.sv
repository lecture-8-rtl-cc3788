// tb_sample_program: runs the course sample program, as assembled (words
// 4400 8810 4001 4988 0702 1005 0000 0000: ZEROS R0; LOADLIT R1,16;
// L1: ADD R0,R0,R1; DECA R1,R1; JF.NEGZERO L1; L2: JT.TRUE L2; NOP; NOP),
// on two cores: one with the jump delay slot (DELAY_SLOT = 1, default) and
// one that squashes the instruction behind a taken jump (DELAY_SLOT = 0).
//   - squash core: the loop sums 16..1, so R0 = 136, R1 = 0, and the core
//     then spins at L2; each loop pass costs 4 cycles (3 instructions and
//     one bubble).
//   - delay-slot core: JT.TRUE L2 sits in the delay slot of JF.NEGZERO and
//     is executed, and ADD (fetched behind the taken JF) becomes the delay
//     slot of JT.TRUE: the loop is left with R0 = 16 + 16 = 31, R1 = 15.
// Both cores are then compared write by write, in order and in timing, with
// the reference model on random programs.
module tb_sample_program;
  import cpu183_pkg::*;
  import cpu183_ref_pkg::*;

  logic clk = 0, rst = 1;
  instr_t imem [256];
  int checks = 0, failures = 0;
  cpu183_iss iss [2];

  // two cores, each with its own memories; index 0: delay slot, 1: squash
  pc_t    ia [2];
  instr_t ii [2];
  dreq_t  dq [2];
  word_t  dr [2];
  logic   we [2];
  reg_t   wc [2];
  word_t  wd [2];
  word_t  dmem0 [256], dmem1 [256];
  int     nwr [2], first [2], cycle, n_bubble;

  cpu183_core #(.DELAY_SLOT(1'b1)) dut_ds (.clk, .rst, .imem_addr(ia[0]), .imem_instr(ii[0]), .dreq(dq[0]),
    .drdata(dr[0]), .ext(8'h00), .wb_we(we[0]), .wb_wc(wc[0]), .wb_data(wd[0]));
  cpu183_core #(.DELAY_SLOT(1'b0)) dut_sq (.clk, .rst, .imem_addr(ia[1]), .imem_instr(ii[1]), .dreq(dq[1]),
    .drdata(dr[1]), .ext(8'h00), .wb_we(we[1]), .wb_wc(wc[1]), .wb_data(wd[1]));

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    ii[0] <= imem[ia[0]];
    ii[1] <= imem[ia[1]];
    if (dq[0].we) dmem0[dq[0].addr[7:0]] <= dq[0].wdata;
    if (dq[1].we) dmem1[dq[1].addr[7:0]] <= dq[1].wdata;
    dr[0] <= dmem0[dq[0].addr[7:0]];
    dr[1] <= dmem1[dq[1].addr[7:0]];
  end

  always @(posedge clk) if (!rst) begin
    for (int k = 0; k < 2; k++) if (we[k]) begin
      checks++;
      if (nwr[k] >= iss[k].trace.size() || {wc[k], wd[k]} !== iss[k].trace[nwr[k]]) begin
        failures++;
        if (failures < 10) $display("FAIL core %0d write %0d: r%0d=%h", k, nwr[k], wc[k], wd[k]);
      end else begin
        if (nwr[k] == 0) first[k] = cycle;
        checks++;
        if (cycle - first[k] != iss[k].trace_step[nwr[k]] - iss[k].trace_step[0]) begin
          failures++;
          if (failures < 10) $display("FAIL core %0d timing of write %0d", k, nwr[k]);
        end
      end
      nwr[k]++;
    end
    if (dut_sq.take) n_bubble++;
    cycle++;
  end

  task automatic run(int ncycles);
    for (int k = 0; k < 2; k++) begin
      iss[k].reset();
      iss[k].mmio = 0;
      iss[k].delay_slot = (k == 0);
      foreach (imem[i]) iss[k].imem[i] = imem[i];
      for (int i = 0; i < ncycles + 10; i++) iss[k].step();
      nwr[k] = 0; first[k] = -1;
    end
    rst = 1;
    repeat (3) @(posedge clk);
    // cleared after reset so that no store of the previous program lands late
    foreach (dmem0[i]) begin dmem0[i] = 0; dmem1[i] = 0; end
    cycle = 0;
    #1 rst = 0;
    repeat (ncycles) @(posedge clk);
    #1;
  endtask

  task automatic expect_eq(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iss[0] = new();
    iss[1] = new();
    n_bubble = 0;
    foreach (imem[i]) imem[i] = 16'h0000;
    imem[0] = 16'h4400; imem[1] = 16'h8810; imem[2] = 16'h4001; imem[3] = 16'h4988;
    imem[4] = 16'h0702; imem[5] = 16'h1005; imem[6] = 16'h0000; imem[7] = 16'h0000;
    run(200);
    expect_eq("squash R0", dut_sq.u_rf.regs[0], 12'd136);
    expect_eq("squash R1", dut_sq.u_rf.regs[1], 12'd0);
    expect_eq("delay-slot R0", dut_ds.u_rf.regs[0], 12'd31);
    expect_eq("delay-slot R1", dut_ds.u_rf.regs[1], 12'd15);
    checks++;
    if (ia[1] != 8'd5 && ia[1] != 8'd6) begin failures++; $display("FAIL squash core not spinning at L2, pc=%h", ia[1]); end
    // squash core: ZEROS and LOADLIT, then ADD and DECA in each of 16 passes
    expect_eq("squash writes", 12'(nwr[1]), 12'(2 + 2 * 16));

    for (int p = 0; p < 30; p++) begin
      for (int i = 0; i < 256; i++) begin
        int k;
        k = $urandom % 20;
        if (k < 11)      imem[i] = enc_alu(5'($urandom), 3'($urandom), 3'($urandom), 3'($urandom));
        else if (k < 14) imem[i] = enc_lit(3'($urandom), 11'($urandom));
        else if (k < 16) imem[i] = enc_load(3'($urandom), 3'($urandom));
        else if (k < 18) imem[i] = enc_store(3'($urandom), 3'($urandom));
        else             imem[i] = enc_jmp(jop_e'($urandom % 3), 4'($urandom % 8), 8'($urandom));
      end
      run(300);
    end
    checks++;
    if (n_bubble == 0) begin failures++; $display("FAIL no squashed jump"); end
    $display("squashed jump slots: %0d", n_bubble);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
