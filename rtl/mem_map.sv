// mem_map: data-address decoder with the memory-mapped I/O registers.
//
// The core presents one request per cycle in E (req) and expects the read
// data in W (rdata, one clock later). Addresses decode as:
//   ADDR_VADDR  VGA frame-buffer address register: a STORE sets it, a LOAD
//               returns it.
//   ADDR_VDATA  VGA frame-buffer data: a STORE writes req.wdata to the frame
//               buffer at the address register, a LOAD reads the frame buffer
//               there (synchronous, data in W like the DRAM).
//   ADDR_CRST   a STORE clears the free-running EXT counter (cnt_clr).
//   otherwise   the data memory, by the low DAW address bits.
// The read source is registered with the request so that rdata picks the
// right memory in W.
// Two memory-mapped addresses for the VGA buffer (address, then data) and a
// memory-mapped counter reset follow the processor's I/O description; the
// address values and the read-back of the address register are this
// design's choices.
module mem_map
  import cpu183_pkg::*;
#(
  parameter int         DAW        = 8,
  parameter logic [11:0] ADDR_VADDR = 12'hFFE,
  parameter logic [11:0] ADDR_VDATA = 12'hFFF,
  parameter logic [11:0] ADDR_CRST  = 12'hFFD
) (
  input  logic           clk,
  input  logic           rst,
  input  dreq_t          req,
  output word_t          rdata,
  // data memory
  output logic           dram_we,
  output logic [DAW-1:0] dram_addr,
  output word_t          dram_wdata,
  input  word_t          dram_rdata,
  // VGA frame buffer port
  output word_t          vga_addr,
  output logic           vga_we,
  output word_t          vga_wdata,
  input  word_t          vga_rdata,
  // EXT counter reset
  output logic           cnt_clr
);
  typedef enum logic [1:0] {SRC_DRAM, SRC_VADDR, SRC_VDATA} src_e;

  logic  is_vaddr, is_vdata, is_crst, is_dram;
  word_t vaddr_q, vaddr_rd;
  src_e  src_q;

  assign is_vaddr = (req.addr == ADDR_VADDR);
  assign is_vdata = (req.addr == ADDR_VDATA);
  assign is_crst  = (req.addr == ADDR_CRST);
  assign is_dram  = !(is_vaddr || is_vdata || is_crst);

  assign dram_we    = req.we && is_dram;
  assign dram_addr  = req.addr[DAW-1:0];
  assign dram_wdata = req.wdata;

  assign vga_addr  = vaddr_q;
  assign vga_we    = req.we && is_vdata;
  assign vga_wdata = req.wdata;

  assign cnt_clr = req.we && is_crst;

  always_ff @(posedge clk) begin
    if (rst)                   vaddr_q <= '0;
    else if (req.we && is_vaddr) vaddr_q <= req.wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      src_q    <= SRC_DRAM;
      vaddr_rd <= '0;
    end else begin
      if (req.re) src_q <= is_vdata ? SRC_VDATA : is_vaddr ? SRC_VADDR : SRC_DRAM;
      vaddr_rd <= vaddr_q;
    end
  end

  always_comb begin
    unique case (src_q)
      SRC_VADDR: rdata = vaddr_rd;
      SRC_VDATA: rdata = vga_rdata;
      default:   rdata = dram_rdata;
    endcase
  end
endmodule
