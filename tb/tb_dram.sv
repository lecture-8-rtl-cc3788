// tb_dram: random reads and writes against a shadow array; read data is
// checked one cycle after the address, old data on a same-address write.
module tb_dram;
  logic clk = 0, we = 0;
  logic [7:0] addr = 0;
  logic [11:0] wdata = 0, rdata, exp;
  logic [11:0] shadow [256];
  int checks = 0, failures = 0;

  dram #(.AW(8), .W(12)) dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (shadow[i]) shadow[i] = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1'($urandom); addr = 8'($urandom % 32); wdata = 12'($urandom);
      exp = shadow[addr];
      @(posedge clk); #1;
      if (we) shadow[addr] = wdata;
      checks++;
      if (rdata !== exp) begin failures++; $display("FAIL addr %h got %h exp %h", addr, rdata, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
