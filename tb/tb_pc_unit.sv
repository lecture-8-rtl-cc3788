// tb_pc_unit: reset to 0, increment by one per cycle, wrap at 256, and load
// of the jump target on take.
module tb_pc_unit;
  logic clk = 0, rst = 1, take = 0;
  logic [7:0] target = 0, pc, exp;
  int checks = 0, failures = 0;

  pc_unit #(.AW(8)) dut (.clk, .rst, .take, .target, .pc);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    checks++; if (pc !== 0) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst = 0; exp = 0;
    for (int n = 0; n < 1000; n++) begin
      take = ($urandom % 4) == 0; target = 8'($urandom);
      @(posedge clk); #1;
      exp = take ? target : exp + 1;
      checks++;
      if (pc !== exp) begin failures++; $display("FAIL pc=%h exp %h", pc, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
