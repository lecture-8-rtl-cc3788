// tb_vga_square: the "flash a square" I/O exercise. A program draws a 4 x 4
// square into a frame buffer through the memory-mapped address/data pair
// (FFE, FFF), waits for one full period of the EXT counter bit, inverts the
// colour and draws again, forever. The frame buffer is a testbench model,
// 64 pixels per row (a layout chosen here), with one-clock read latency.
// The counter tap is lowered to bit 8 so that a period is 512 cycles.
// Checks: every frame-buffer write lands inside the square; after each
// drawing pass all 16 pixels hold the pass's colour, which alternates
// between all ones and zero; no pixel outside the square changes; passes are
// one counter period apart.
module tb_vga_square;
  import cpu183_pkg::*;

  localparam int ROW = 64, X0 = 8, Y0 = 5, BASE = Y0 * ROW + X0;
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
  int checks = 0, failures = 0, passes = 0, nwrites = 0;
  longint cycle = 0, last_pass = -1;
  pc_t prev_pc;

  cpu183_soc #(.CNT_TAP(8)) dut (.clk, .rst, .prog_we, .prog_addr, .prog_data,
    .vga_addr, .vga_we, .vga_wdata, .vga_rdata, .pc, .wb_we, .wb_wc, .wb_data);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (vga_we) fb[vga_addr] <= vga_wdata;
    vga_rdata <= fb[vga_addr];
  end

  function automatic bit in_square(int a);
    return (a / ROW) >= Y0 && (a / ROW) < Y0 + 4 && (a % ROW) >= X0 && (a % ROW) < X0 + 4;
  endfunction

  always @(posedge clk) if (!rst) begin
    cycle++;
    if (vga_we) begin
      nwrites++;
      checks++;
      if (!in_square(int'(vga_addr))) begin failures++; $display("FAIL write outside square at %h", vga_addr); end
    end
    // entering the wait loop ends a drawing pass
    if (pc == 8'h13 && prev_pc == 8'h12) begin
      word_t exp;
      passes++;
      exp = (passes % 2 == 1) ? 12'hFFF : 12'h000;
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++) begin
          checks++;
          if (fb[BASE + y * ROW + x] !== exp) begin
            failures++; $display("FAIL pass %0d pixel (%0d,%0d) = %h", passes, x, y, fb[BASE + y * ROW + x]);
          end
        end
      checks++;
      if (fb[BASE - 1] !== 0 || fb[BASE + 4] !== 0 || fb[BASE + 4 * ROW] !== 0) begin
        failures++; $display("FAIL pixel outside the square changed");
      end
      if (passes >= 3) begin
        checks++;
        if (cycle - last_pass < 512 - 8 || cycle - last_pass > 512 + 8) begin
          failures++; $display("FAIL pass spacing %0d cycles", cycle - last_pass);
        end
      end
      last_pass = cycle;
    end
    prev_pc = pc;
  end

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (fb[i]) fb[i] = 0;
    foreach (prog[i]) prog[i] = INSTR_NOP;
    prog[8'h00] = enc_alu(OP_ONES, 3'd7, 3'd0, 3'd0);       // R7 = FFF (pixel data)
    prog[8'h01] = enc_alu(OP_DECA, 3'd6, 3'd7, 3'd0);       // R6 = FFE (pixel address)
    prog[8'h02] = enc_alu(OP_ZEROS, 3'd0, 3'd0, 3'd0);      // R0 = colour
    prog[8'h03] = enc_alu(OP_PASSNOTA, 3'd0, 3'd0, 3'd0);   // frame: invert colour
    prog[8'h04] = enc_lit(3'd1, 11'(BASE));                 // R1 = row start
    prog[8'h05] = enc_lit(3'd3, 11'd4);                     // R3 = rows
    prog[8'h06] = enc_alu(OP_PASSA, 3'd4, 3'd1, 3'd0);      // row: R4 = R1
    prog[8'h07] = enc_lit(3'd2, 11'd4);                     // R2 = columns
    prog[8'h08] = enc_store(3'd6, 3'd4);                    // col: address = R4
    prog[8'h09] = enc_store(3'd7, 3'd0);                    // pixel = colour
    prog[8'h0A] = enc_alu(OP_INCA, 3'd4, 3'd4, 3'd0);
    prog[8'h0B] = enc_alu(OP_DECA, 3'd2, 3'd2, 3'd0);
    prog[8'h0C] = enc_jmp(JOP_JF, COND_ZERO, 8'h08);
    prog[8'h0D] = INSTR_NOP;
    prog[8'h0E] = enc_lit(3'd5, 11'(ROW));
    prog[8'h0F] = enc_alu(OP_ADD, 3'd1, 3'd1, 3'd5);        // next row
    prog[8'h10] = enc_alu(OP_DECA, 3'd3, 3'd3, 3'd0);
    prog[8'h11] = enc_jmp(JOP_JF, COND_ZERO, 8'h06);
    prog[8'h12] = INSTR_NOP;
    prog[8'h13] = enc_jmp(JOP_JF, COND_EXT, 8'h13);         // wait for EXT high
    prog[8'h14] = INSTR_NOP;
    prog[8'h15] = enc_jmp(JOP_JT, COND_EXT, 8'h15);         // wait for EXT low
    prog[8'h16] = INSTR_NOP;
    prog[8'h17] = enc_jmp(JOP_J, COND_TRUE, 8'h03);
    prog[8'h18] = INSTR_NOP;

    repeat (2) @(posedge clk);
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 8'(i); prog_data = prog[i];
    end
    @(negedge clk) prog_we = 0;
    @(posedge clk); #1 rst = 0;
    wait (passes == 8);
    #1;
    checks++;
    if (nwrites != 8 * 16) begin failures++; $display("FAIL %0d pixel writes, expected 128", nwrites); end
    $display("passes=%0d pixel writes=%0d", passes, nwrites);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
