// fwd_unit: forwarding (bypass) control for the two E-stage operand muxes.
//
// The register file is read in R and written at the end of W, so an
// instruction in E may miss the results of the two instructions ahead of it:
// the one now in W (not yet written) and the one that left W in the previous
// cycle (written at the same edge the operands were latched). For each
// source register the unit selects FWD_W if the W instruction writes it,
// otherwise FWD_PREV if the previous write-back did, otherwise FWD_RF.
// The nearer instruction wins. Combinational.
// The unit and its three-input muxes follow the processor's block diagram;
// which value feeds each mux input is this design's reading of it.
module fwd_unit
  import cpu183_pkg::*;
(
  input  reg_t     ra,
  input  reg_t     rb,
  input  logic     w_we,
  input  reg_t     w_wc,
  input  logic     p_we,
  input  reg_t     p_wc,
  output fwd_sel_e sel_a,
  output fwd_sel_e sel_b
);
  function automatic fwd_sel_e pick(reg_t r);
    if (w_we && w_wc == r)      return FWD_W;
    else if (p_we && p_wc == r) return FWD_PREV;
    else                        return FWD_RF;
  endfunction

  assign sel_a = pick(ra);
  assign sel_b = pick(rb);
endmodule
