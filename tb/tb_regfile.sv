// tb_regfile: random writes and reads against a shadow array; checks that a
// write is seen from the next cycle on both read ports and that reset clears.
module tb_regfile;
  logic clk = 0, rst = 1, we = 0;
  logic [2:0] ra = 0, rb = 0, wc = 0;
  logic [11:0] da, db, dc = 0;
  logic [11:0] shadow [8];
  int checks = 0, failures = 0;

  regfile #(.W(12), .N(8)) dut (.clk, .rst, .ra, .rb, .da, .db, .we, .wc, .dc);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (shadow[i]) shadow[i] = 0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 8; i++) begin
      ra = 3'(i); #1; checks++;
      if (da !== 0) begin failures++; $display("FAIL reset r%0d=%h", i, da); end
    end
    for (int n = 0; n < 2000; n++) begin
      we = 1'($urandom); wc = 3'($urandom); dc = 12'($urandom);
      ra = 3'($urandom); rb = 3'($urandom);
      #1;
      checks++;
      if (da !== shadow[ra] || db !== shadow[rb]) begin
        failures++; $display("FAIL read ra=%0d %h/%h rb=%0d %h/%h", ra, da, shadow[ra], rb, db, shadow[rb]);
      end
      @(posedge clk);
      if (we) shadow[wc] = dc;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
