// tb_shift_unit: checks LSL and ASR by one bit, and the bit shifted out.
module tb_shift_unit;
  logic [11:0] a, y;
  logic        op0, cout;
  int checks = 0, failures = 0;

  shift_unit #(.W(12)) dut (.a, .op0, .y, .cout);

  task automatic check(logic [11:0] ta, logic top);
    logic [11:0] ey; logic ec;
    a = ta; op0 = top; #1;
    if (!top) begin ey = ta << 1; ec = ta[11]; end
    else begin ey = 12'($signed(ta) >>> 1); ec = ta[0]; end
    checks++;
    if (y !== ey || cout !== ec) begin
      failures++;
      $display("FAIL op0=%b a=%h got %h/%b exp %h/%b", top, ta, y, cout, ey, ec);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(12'h801, 1'b0); check(12'h801, 1'b1);
    check(12'hFFF, 1'b1); check(12'h7FE, 1'b1); check(12'h400, 1'b0);
    for (int i = 0; i < 500; i++) check(12'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
