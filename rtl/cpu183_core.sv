// cpu183_core: the four-stage pipelined 12-bit RISC processor core.
//
// Stages, one clock each, one instruction entering per clock, no stalls:
//   I  the PC addresses the instruction memory (synchronous block RAM whose
//      output register is the I/R pipeline register).
//   R  cntrl decodes the instruction and resolves jumps; the register file is
//      read at sources A and B. A taken jump loads the PC at the end of R, so
//      the instruction fetched meanwhile (the delay slot) still executes.
//   E  fwd_unit steers each operand from the register-file value, the W-stage
//      result or the previous cycle's write-back; the ALU computes; a LOAD or
//      STORE presents address A (and data B) to the data memory; ALU
//      instructions latch their flags into the condition-code register.
//   W  the result is chosen from ALU output, literal and load data and written
//      to register C at the end of the cycle.
// DELAY_SLOT = 0 instead squashes the instruction fetched behind a taken jump
// (one lost cycle per taken jump, no delay slot for the programmer).
// A jump in R tests the flags of the ALU instruction in E if there is one,
// else the condition-code register, so it always sees the most recent ALU
// instruction ahead of it.
// Interface: imem_* to the instruction memory; dreq (in E) and drdata (in W,
// one clock later) to the data memory system; ext are the external jump
// conditions; wb_* show each register write for observation.
// Stage split, unit placement and forwarding follow the processor's block
// diagram and pipeline tables; reset behaviour, the flag bypass to R, the
// exact forwarding sources and the squash option are this design's choices.
module cpu183_core
  import cpu183_pkg::*;
#(
  parameter bit DELAY_SLOT = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  output pc_t        imem_addr,
  input  instr_t     imem_instr,
  output dreq_t      dreq,
  input  word_t      drdata,
  input  logic [7:0] ext,
  output logic       wb_we,
  output reg_t       wb_wc,
  output word_t      wb_data
);
  // ---------------- I stage
  pc_t  pc;
  logic take;
  pc_t  target;
  logic r_valid;

  pc_unit #(.AW(PCW)) u_pc (.clk, .rst, .take, .target, .pc);
  assign imem_addr = pc;

  // The instruction fetched while a taken jump is in R is executed when
  // DELAY_SLOT = 1 and turned into a bubble when DELAY_SLOT = 0.
  always_ff @(posedge clk) r_valid <= ~rst & ~(take & ~DELAY_SLOT);

  // ---------------- R stage
  ctl_t   r_ctl, e_ctl, w_ctl;
  flags_t cc, e_flags, jflags;
  word_t  rf_da, rf_db;

  assign jflags = (e_ctl.valid && e_ctl.alu) ? e_flags : cc;

  cntrl u_cntrl (
    .instr(imem_instr), .valid(r_valid), .flags(jflags), .ext,
    .ctl(r_ctl), .take, .target
  );

  regfile #(.W(DW), .N(NREG)) u_rf (
    .clk, .rst,
    .ra(r_ctl.ra), .rb(r_ctl.rb), .da(rf_da), .db(rf_db),
    .we(wb_we), .wc(wb_wc), .dc(wb_data)
  );

  // ---------------- R/E register
  word_t e_da, e_db;
  always_ff @(posedge clk) begin
    if (rst) e_ctl <= '0;
    else     e_ctl <= r_ctl;
    e_da <= rf_da;
    e_db <= rf_db;
  end

  // ---------------- E stage
  fwd_sel_e sel_a, sel_b;
  word_t    op_a, op_b, e_y;
  logic     p_we;
  reg_t     p_wc;
  word_t    p_data;

  fwd_unit u_fwd (
    .ra(e_ctl.ra), .rb(e_ctl.rb),
    .w_we(wb_we), .w_wc(wb_wc),
    .p_we, .p_wc,
    .sel_a, .sel_b
  );

  always_comb begin
    unique case (sel_a)
      FWD_W:    op_a = wb_data;
      FWD_PREV: op_a = p_data;
      default:  op_a = e_da;
    endcase
    unique case (sel_b)
      FWD_W:    op_b = wb_data;
      FWD_PREV: op_b = p_data;
      default:  op_b = e_db;
    endcase
  end

  alu #(.W(DW)) u_alu (.a(op_a), .b(op_b), .op(e_ctl.op), .y(e_y), .flags(e_flags));

  always_comb begin
    dreq.re    = e_ctl.valid & e_ctl.load;
    dreq.we    = e_ctl.valid & e_ctl.store;
    dreq.addr  = op_a;
    dreq.wdata = op_b;
  end

  always_ff @(posedge clk) begin
    if (rst)                          cc <= '0;
    else if (e_ctl.valid && e_ctl.alu) cc <= e_flags;
  end

  // ---------------- E/W register
  word_t w_y, w_lit;
  always_ff @(posedge clk) begin
    if (rst) w_ctl <= '0;
    else     w_ctl <= e_ctl;
    w_y   <= e_y;
    w_lit <= e_ctl.lit;
  end

  // ---------------- W stage
  always_comb begin
    unique case (w_ctl.wbsel)
      WB_LIT:  wb_data = w_lit;
      WB_MEM:  wb_data = drdata;
      default: wb_data = w_y;
    endcase
  end
  assign wb_we = w_ctl.valid & w_ctl.we;
  assign wb_wc = w_ctl.wc;

  // Previous write-back, for forwarding into E
  always_ff @(posedge clk) begin
    if (rst) p_we <= 1'b0;
    else     p_we <= wb_we;
    p_wc   <= wb_wc;
    p_data <= wb_data;
  end

  // A load and a store never issue together.
  a_mem_excl: assert property (@(posedge clk) disable iff (rst) !(dreq.re && dreq.we));
endmodule
