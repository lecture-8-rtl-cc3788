// cpu183_ref_pkg: instruction-level reference model of the processor, used by
// the testbenches to work out expected results independently of the RTL.
//
// ref_alu computes result and flags straight from the instruction table.
// cpu183_iss executes one instruction per step in program order with the
// architectural rules of the pipeline: a jump takes effect after one delay
// slot (or squashes it when delay_slot = 0), jumps see the flags of every earlier ALU instruction, only ALU
// instructions change the flags. Memory-mapped addresses are modelled with
// the same values as the RTL defaults. External conditions are not modelled
// (programs run on it must not test EXT).
package cpu183_ref_pkg;

  typedef struct {
    logic [11:0] y;
    logic neg, zero, carry;
  } ref_res_t;

  function automatic ref_res_t ref_alu(logic [11:0] a, logic [11:0] b, logic [4:0] op);
    ref_res_t r;
    logic [12:0] s;
    s = '0;
    r.carry = 1'b0;
    case (op)
      5'h00: s = {1'b0, a} + {1'b0, b};
      5'h01: s = {1'b0, a} + {1'b0, b} + 13'd1;
      5'h02: s = {1'b0, a};
      5'h03: s = {1'b0, a} + 13'd1;
      5'h04: s = {1'b0, a} + {1'b0, ~b};
      5'h05: s = {1'b0, a} + {1'b0, ~b} + 13'd1;
      5'h06: s = {1'b0, a} + 13'h0FFF;
      5'h07: s = {1'b0, a} + 13'h1000;
      5'h08, 5'h0A, 5'h0C, 5'h0E: s = {a, 1'b0};
      5'h09, 5'h0B, 5'h0D, 5'h0F: s = {a[0], a[11], a[11:1]};
      5'h10: s = 13'(12'h000);
      5'h11: s = 13'(a & b);
      5'h12: s = 13'(~a & b);
      5'h13: s = 13'(b);
      5'h14: s = 13'(a & ~b);
      5'h15: s = 13'(a);
      5'h16: s = 13'(a ^ b);
      5'h17: s = 13'(a | b);
      5'h18: s = 13'(~(a | b));
      5'h19: s = 13'(~(a ^ b));
      5'h1A: s = 13'(~a);
      5'h1B: s = 13'(~a | b);
      5'h1C: s = 13'(~b);
      5'h1D: s = 13'(a | ~b);
      5'h1E: s = 13'(~(a & b));
      default: s = 13'(12'hFFF);
    endcase
    r.y = s[11:0];
    r.carry = op[4] ? 1'b0 : s[12];
    r.neg = r.y[11];
    r.zero = (r.y == 12'h000);
    return r;
  endfunction

  class cpu183_iss;
    logic [15:0] imem [256];
    logic [11:0] regs [8];
    logic [11:0] dmem [256];
    logic [11:0] vga  [4096];
    logic [11:0] vaddr;
    logic neg, zero, carry;
    logic [7:0] pc, npc;
    // register-write trace: one entry per write, {reg, value}
    logic [14:0] trace [$];
    int          trace_step [$];   // program-order index of each write
    int n_taken, step_no;
    bit mmio = 1;                  // 0: every address goes to dmem
    bit delay_slot = 1;            // 0: instruction behind a taken jump is squashed

    function new();
      foreach (imem[i]) imem[i] = 16'h0000;
      reset();
    endfunction

    function void reset();
      foreach (regs[i]) regs[i] = '0;
      foreach (dmem[i]) dmem[i] = '0;
      foreach (vga[i])  vga[i]  = '0;
      vaddr = '0; neg = 0; zero = 0; carry = 0;
      pc = 0; npc = 1; n_taken = 0; step_no = 0;
      trace.delete(); trace_step.delete();
    endfunction

    function void wr(logic [2:0] c, logic [11:0] v);
      regs[c] = v;
      trace.push_back({c, v});
      trace_step.push_back(step_no);
    endfunction

    function void step();
      logic [15:0] in;
      logic [7:0]  nn;
      logic        cond, take;
      ref_res_t    r;
      logic [11:0] ad;
      take = 0;
      in = imem[pc];
      nn = npc + 8'd1;
      case (in[15:14])
        2'b00: begin
          case (in[11:8])
            4'b0000: cond = 1;
            4'b0100: cond = neg;
            4'b0101: cond = zero;
            4'b0110: cond = carry;
            4'b0111: cond = neg | zero;
            default: cond = 0;
          endcase
          case (in[13:12])
            2'b00: take = !cond;
            2'b01: take = cond;
            2'b10: take = 1;
            default: take = 0;
          endcase
          if (take) begin nn = in[7:0]; n_taken++; end
        end
        2'b01: begin
          r = ref_alu(regs[in[5:3]], regs[in[2:0]], in[10:6]);
          neg = r.neg; zero = r.zero; carry = r.carry;
          wr(in[13:11], r.y);
        end
        2'b10: wr(in[13:11], {1'b0, in[10:0]});
        default: begin
          ad = regs[in[5:3]];
          if (!mmio) ad[11:8] = 4'h0;
          if (in[10:6] == 5'h08) begin
            if (ad == 12'hFFF)      wr(in[13:11], vga[vaddr]);
            else if (ad == 12'hFFE) wr(in[13:11], vaddr);
            else if (ad == 12'hFFD) wr(in[13:11], dmem[ad[7:0]]);
            else                    wr(in[13:11], dmem[ad[7:0]]);
          end else if (in[10:6] == 5'h10) begin
            if (ad == 12'hFFF)      vga[vaddr] = regs[in[2:0]];
            else if (ad == 12'hFFE) vaddr = regs[in[2:0]];
            else if (ad == 12'hFFD) ;
            else                    dmem[ad[7:0]] = regs[in[2:0]];
          end
        end
      endcase
      step_no++;
      if (in[15:14] == 2'b00 && take && !delay_slot) begin
        // the fetched instruction is dropped: one bubble cycle
        pc = nn;
        npc = nn + 8'd1;
        step_no++;
      end else begin
        pc = npc;
        npc = nn;
      end
    endfunction
  endclass

endpackage
