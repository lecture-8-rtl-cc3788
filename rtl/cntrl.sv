// cntrl: the R-stage control unit.
//
// It decodes the instruction leaving the instruction memory into the control
// word (ctl_t) that travels with it through E and W, and it resolves jumps.
// A jump's condition is evaluated against `flags`, which the core supplies
// with the flags of the ALU instruction in E when there is one (so a jump can
// test the instruction right before it) and the condition-code register
// otherwise. External conditions are COND = 1xxx, selecting ext[xxx].
// JF jumps when the condition is false, JT when it is true, J always.
// take/target go straight to the PC, so the instruction behind the jump is
// fetched anyway and executes (one delay slot). Combinational.
// Formats, opcodes and condition codes follow the instruction set; resolving
// in R with a delay slot follows the branch timing diagram; unlisted codes
// (control OP 11, COND 0001-0011, memory OPs other than 08/10) decode as
// no operation by this design's choice.
module cntrl
  import cpu183_pkg::*;
(
  input  instr_t     instr,
  input  logic       valid,
  input  flags_t     flags,
  input  logic [7:0] ext,
  output ctl_t       ctl,
  output logic       take,
  output pc_t        target
);
  iclass_e    cls;
  logic [3:0] cond;
  logic       cond_true;

  assign cls  = iclass_e'(instr[15:14]);
  assign cond = instr[11:8];

  always_comb begin
    if (cond[3]) cond_true = ext[cond[2:0]];
    else begin
      unique case (cond)
        COND_TRUE:    cond_true = 1'b1;
        COND_NEG:     cond_true = flags.neg;
        COND_ZERO:    cond_true = flags.zero;
        COND_CARRY:   cond_true = flags.carry;
        COND_NEGZERO: cond_true = flags.neg | flags.zero;
        default:      cond_true = 1'b0;
      endcase
    end
  end

  always_comb begin
    ctl       = '0;
    ctl.valid = valid;
    ctl.wc    = instr[13:11];
    ctl.op    = instr[10:6];
    ctl.ra    = instr[5:3];
    ctl.rb    = instr[2:0];
    ctl.lit   = {1'b0, instr[10:0]};
    ctl.wbsel = WB_ALU;
    take      = 1'b0;
    target    = instr[7:0];
    if (valid) begin
      unique case (cls)
        CLS_CTRL: begin
          unique case (jop_e'(instr[13:12]))
            JOP_JF:  take = ~cond_true;
            JOP_JT:  take = cond_true;
            JOP_J:   take = 1'b1;
            default: take = 1'b0;
          endcase
        end
        CLS_ALU: begin
          ctl.alu = 1'b1;
          ctl.we  = 1'b1;
        end
        CLS_LIT: begin
          ctl.we    = 1'b1;
          ctl.wbsel = WB_LIT;
        end
        CLS_MEM: begin
          if (instr[10:6] == MOP_LOAD) begin
            ctl.load  = 1'b1;
            ctl.we    = 1'b1;
            ctl.wbsel = WB_MEM;
          end else if (instr[10:6] == MOP_STORE) begin
            ctl.store = 1'b1;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
