// cpu183_soc: the complete microcontroller system.
//
// The pipelined core fetches from the instruction memory (irom) and issues
// data accesses to mem_map, which routes them to the data memory (dram), to
// the memory-mapped VGA frame-buffer port and to the reset of the
// free-running counter (ext_counter) whose bits are the core's external jump
// conditions.
// Ports: clk, rst (synchronous, active high; hold it while loading a
// program); prog_* write the instruction memory; vga_* connect an external
// frame buffer (synchronous read, one clock latency) belonging to a VGA
// display controller outside this design; pc and wb_* are for observation.
// DELAY_SLOT selects whether the instruction behind a taken jump executes
// (1, default) or is squashed (0); see cpu183_core.
// The system structure follows the processor's block diagram and I/O
// description; the program-load port is this design's addition.
module cpu183_soc
  import cpu183_pkg::*;
#(
  parameter bit DELAY_SLOT = 1'b1,
  parameter int DAW     = 8,
  parameter int CNT_W   = 24,
  parameter int CNT_TAP = 20
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       prog_we,
  input  pc_t        prog_addr,
  input  instr_t     prog_data,
  output word_t      vga_addr,
  output logic       vga_we,
  output word_t      vga_wdata,
  input  word_t      vga_rdata,
  output pc_t        pc,
  output logic       wb_we,
  output reg_t       wb_wc,
  output word_t      wb_data
);
  instr_t            instr;
  dreq_t             dreq;
  word_t             drdata, dram_wdata, dram_rdata;
  logic              dram_we, cnt_clr;
  logic [DAW-1:0]    dram_addr;
  logic [7:0]        ext;

  cpu183_core #(.DELAY_SLOT(DELAY_SLOT)) u_core (
    .clk, .rst,
    .imem_addr(pc), .imem_instr(instr),
    .dreq, .drdata, .ext,
    .wb_we, .wb_wc, .wb_data
  );

  irom #(.AW(PCW), .IW(IW)) u_irom (
    .clk, .addr(pc), .instr, .prog_we, .prog_addr, .prog_data
  );

  mem_map #(.DAW(DAW)) u_map (
    .clk, .rst, .req(dreq), .rdata(drdata),
    .dram_we, .dram_addr, .dram_wdata, .dram_rdata,
    .vga_addr, .vga_we, .vga_wdata, .vga_rdata,
    .cnt_clr
  );

  dram #(.AW(DAW), .W(DW)) u_dram (
    .clk, .we(dram_we), .addr(dram_addr), .wdata(dram_wdata), .rdata(dram_rdata)
  );

  ext_counter #(.CW(CNT_W), .TAP(CNT_TAP)) u_cnt (
    .clk, .rst, .clr(cnt_clr), .ext
  );
endmodule
