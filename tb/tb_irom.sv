// tb_irom: loads words through the program port and checks the one-cycle
// synchronous read, and that untouched words read as NOP (0x0000).
module tb_irom;
  logic clk = 0, prog_we = 0;
  logic [7:0] addr = 0, prog_addr = 0;
  logic [15:0] instr, prog_data = 0;
  logic [15:0] shadow [256];
  int checks = 0, failures = 0;

  irom #(.AW(8), .IW(16)) dut (.clk, .addr, .instr, .prog_we, .prog_addr, .prog_data);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (shadow[i]) shadow[i] = 0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 8'(i * 2); prog_data = 16'($urandom);
      shadow[i * 2] = prog_data;
    end
    @(negedge clk) prog_we = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk) addr = 8'($urandom);
      @(posedge clk) #1;
      checks++;
      if (instr !== shadow[addr]) begin
        failures++; $display("FAIL addr %h got %h exp %h", addr, instr, shadow[addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
