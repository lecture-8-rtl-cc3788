// tb_boolean_unit: checks all sixteen Boolean opcodes (10-1F) against the
// function named in the instruction table, written out as an expression.
module tb_boolean_unit;
  logic [11:0] a, b, y;
  logic [3:0]  op;
  int checks = 0, failures = 0;

  boolean_unit #(.W(12)) dut (.a, .b, .op, .y);

  function automatic logic [11:0] model(logic [11:0] a, logic [11:0] b, logic [3:0] op);
    case (op)
      4'h0: return '0;            // ZEROS
      4'h1: return a & b;         // AND
      4'h2: return ~a & b;        // ANDNOTA
      4'h3: return b;             // PASSB
      4'h4: return a & ~b;        // ANDNOTB
      4'h5: return a;             // PASSA
      4'h6: return a ^ b;         // XOR
      4'h7: return a | b;         // OR
      4'h8: return ~a & ~b;       // NOR
      4'h9: return a ^ ~b;        // XNOR
      4'hA: return ~a;            // PASSNOTA
      4'hB: return ~a | b;        // ORNOTA
      4'hC: return ~b;            // PASSNOTB
      4'hD: return a | ~b;        // ORNOTB
      4'hE: return ~a | ~b;       // NAND
      default: return '1;         // ONES
    endcase
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 16; o++) begin
      for (int i = 0; i < 100; i++) begin
        a = (i == 0) ? 12'hC3C : 12'($urandom);
        b = (i == 0) ? 12'hAAA : 12'($urandom);
        op = 4'(o); #1;
        checks++;
        if (y !== model(a, b, op)) begin
          failures++;
          $display("FAIL op=%h a=%h b=%h got %h exp %h", op, a, b, y, model(a, b, op));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
