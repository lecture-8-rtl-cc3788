// tb_mem_map: routing of data requests to the data memory, the VGA address
// register, the VGA data port and the counter reset, and selection of the read
// data one cycle later. The data memory and the frame buffer are testbench
// models with one-cycle read latency.
module tb_mem_map;
  import cpu183_pkg::*;
  logic clk = 0, rst = 1;
  dreq_t req;
  word_t rdata, dram_wdata, dram_rdata, vga_addr, vga_wdata, vga_rdata;
  logic dram_we, vga_we, cnt_clr;
  logic [7:0] dram_addr;
  word_t dmem [256];
  word_t fb [4096];
  int checks = 0, failures = 0;

  mem_map #(.DAW(8)) dut (.clk, .rst, .req, .rdata, .dram_we, .dram_addr, .dram_wdata, .dram_rdata,
                          .vga_addr, .vga_we, .vga_wdata, .vga_rdata, .cnt_clr);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (dram_we) dmem[dram_addr] <= dram_wdata;
    dram_rdata <= dmem[dram_addr];
    if (vga_we) fb[vga_addr] <= vga_wdata;
    vga_rdata <= fb[vga_addr];
  end

  task automatic access(logic we, logic re, word_t addr, word_t wd);
    @(negedge clk);
    req = '{re: re, we: we, addr: addr, wdata: wd};
  endtask

  task automatic check_rd(word_t exp, string what);
    @(negedge clk);
    req = '0;
    checks++;
    if (rdata !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, rdata, exp); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (dmem[i]) dmem[i] = 0;
    foreach (fb[i]) fb[i] = 0;
    req = '0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    // DRAM store then load
    access(1, 0, 12'h012, 12'hABC);
    #1 checks++; if (!dram_we || vga_we || cnt_clr) failures++;
    access(0, 1, 12'h012, 0);
    check_rd(12'hABC, "dram load");
    // VGA address register
    access(1, 0, 12'hFFE, 12'h345);
    #1 checks++; if (dram_we || vga_we) failures++;
    @(negedge clk) req = '0; #1;
    checks++; if (vga_addr !== 12'h345) begin failures++; $display("FAIL vaddr %h", vga_addr); end
    // VGA data store
    access(1, 0, 12'hFFF, 12'h5A5);
    #1 checks++; if (!vga_we || dram_we || vga_wdata !== 12'h5A5) failures++;
    @(negedge clk) req = '0;
    checks++; if (fb[12'h345] !== 12'h5A5) begin failures++; $display("FAIL fb write"); end
    // VGA data load, address register read back
    fb[12'h346] = 12'h777;
    access(1, 0, 12'hFFE, 12'h346);
    access(0, 1, 12'hFFF, 0);
    check_rd(12'h777, "vga load");
    access(0, 1, 12'hFFE, 0);
    check_rd(12'h346, "vaddr load");
    // counter reset
    access(1, 0, 12'hFFD, 0);
    #1 checks++; if (!cnt_clr || dram_we || vga_we) failures++;
    access(0, 0, 12'hFFD, 0);
    #1 checks++; if (cnt_clr) failures++;
    // random DRAM traffic
    for (int n = 0; n < 300; n++) begin
      word_t ad, v;
      ad = 12'($urandom % 64); v = 12'($urandom);
      access(1, 0, ad, v);
      access(0, 1, ad, 0);
      check_rd(v, "dram random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
