// tb_arith_unit: checks all eight arithmetic opcodes against the instruction
// table (written out case by case) on edge values and random operands.
module tb_arith_unit;
  logic [11:0] a, b, y;
  logic [2:0]  op;
  logic        cout;
  int checks = 0, failures = 0;

  arith_unit #(.W(12)) dut (.a, .b, .op, .y, .cout);

  function automatic logic [12:0] model(logic [11:0] a, logic [11:0] b, logic [2:0] op);
    case (op)
      3'd0: return {1'b0, a} + {1'b0, b};            // ADD
      3'd1: return {1'b0, a} + {1'b0, b} + 13'd1;    // ADDINC
      3'd2: return {1'b0, a};                        // PASSA
      3'd3: return {1'b0, a} + 13'd1;                // INCA
      3'd4: return {1'b0, a} + {1'b0, ~b};           // SUBDEC = a-b-1
      3'd5: return {1'b0, a} + {1'b0, ~b} + 13'd1;   // SUB
      3'd6: return {1'b0, a} + 13'hFFF;              // DECA
      default: return {1'b0, a} + 13'h1000;          // PASSA (a + ~0 + 1)
    endcase
  endfunction

  task automatic check(logic [11:0] ta, logic [11:0] tb_, logic [2:0] top);
    logic [12:0] exp;
    a = ta; b = tb_; op = top; #1;
    exp = model(ta, tb_, top);
    checks++;
    if ({cout, y} !== exp) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h got c=%b y=%h exp c=%b y=%h", top, ta, tb_, cout, y, exp[12], exp[11:0]);
    end
    // the result column of the table, independent of carry
    checks++;
    case (top)
      3'd0: if (y !== 12'(ta + tb_))      failures++;
      3'd1: if (y !== 12'(ta + tb_ + 1))  failures++;
      3'd2, 3'd7: if (y !== ta)           failures++;
      3'd3: if (y !== 12'(ta + 1))        failures++;
      3'd4: if (y !== 12'(ta - tb_ - 1))  failures++;
      3'd5: if (y !== 12'(ta - tb_))      failures++;
      default: if (y !== 12'(ta - 1))     failures++;
    endcase
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 8; o++) begin
      check(12'h000, 12'h000, 3'(o));
      check(12'hFFF, 12'h001, 3'(o));
      check(12'h800, 12'h7FF, 3'(o));
      check(12'h123, 12'h456, 3'(o));
      for (int i = 0; i < 200; i++) check(12'($urandom), 12'($urandom), 3'(o));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
