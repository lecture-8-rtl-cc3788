// tb_fwd_unit: exhaustive check of the forwarding selects over all source,
// destination and enable combinations.
module tb_fwd_unit;
  import cpu183_pkg::*;
  reg_t ra, rb, w_wc, p_wc;
  logic w_we, p_we;
  fwd_sel_e sel_a, sel_b;
  int checks = 0, failures = 0;

  fwd_unit dut (.ra, .rb, .w_we, .w_wc, .p_we, .p_wc, .sel_a, .sel_b);

  function automatic fwd_sel_e exp_sel(reg_t r);
    if (w_we && (w_wc == r)) return FWD_W;
    if (p_we && (p_wc == r)) return FWD_PREV;
    return FWD_RF;
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**14; v++) begin
      {ra, rb, w_wc, p_wc, w_we, p_we} = 14'(v);
      #1;
      checks++;
      if (sel_a !== exp_sel(ra) || sel_b !== exp_sel(rb)) begin
        failures++; $display("FAIL v=%h a=%0d b=%0d", v, sel_a, sel_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
