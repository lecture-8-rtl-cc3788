// tb_ext_counter: with TAP = 2, ext must equal bits 9:2 of a cycle count kept
// by the testbench; a clear restarts that count.
module tb_ext_counter;
  logic clk = 0, rst = 1, clr = 0;
  logic [7:0] ext;
  int unsigned cyc;
  int checks = 0, failures = 0, n_ext0_rise = 0;
  logic prev0 = 0;

  ext_counter #(.CW(16), .TAP(2)) dut (.clk, .rst, .clr, .ext);

  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0; cyc = 0;
    for (int n = 0; n < 3000; n++) begin
      clr = (n == 1500);
      @(posedge clk); #1;
      cyc = clr ? 0 : cyc + 1;
      checks++;
      if (ext !== 8'(cyc >> 2)) begin failures++; $display("FAIL n=%0d ext=%h exp %h", n, ext, 8'(cyc >> 2)); end
      if (ext[0] && !prev0) n_ext0_rise++;
      prev0 = ext[0];
    end
    // ext[0] has period 8 cycles: 3000 cycles give about 375 rising edges
    checks++;
    if (n_ext0_rise < 370 || n_ext0_rise > 380) begin failures++; $display("FAIL rises %0d", n_ext0_rise); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
