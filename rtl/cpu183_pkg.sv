// cpu183_pkg: shared types and constants of the 12-bit four-stage RISC
// microcontroller.
//
// The machine has a 12-bit datapath, eight general-purpose registers, 16-bit
// instructions and an 8-bit program counter. Bits 15:14 of every instruction
// select one of four formats:
//   00 control transfer  [13:12] OP (00 JF, 01 JT, 10 J), [11:8] COND, [7:0] address
//   01 ALU               [13:11] C, [10:6] OP, [5:3] A, [2:0] B
//   10 literal           [13:11] C, [10:0] literal (zero-extended)
//   11 memory            same fields as ALU; OP 08 = LOAD C,[A], OP 10 = STORE [A],B
// The opcode values, the ALU/literal/control fields and the condition codes
// are those of the instruction-set tables. Putting the memory instructions in
// class 11 (their opcodes would otherwise collide with LSL and ZEROS) and
// zero-extending the literal are this design's choices.
package cpu183_pkg;

  localparam int DW   = 12;   // data word
  localparam int IW   = 16;   // instruction word
  localparam int NREG = 8;    // general-purpose registers
  localparam int RW   = 3;    // register index width
  localparam int PCW  = 8;    // program counter / jump address
  localparam int NEXT = 8;    // external jump conditions

  typedef logic [DW-1:0]  word_t;
  typedef logic [IW-1:0]  instr_t;
  typedef logic [RW-1:0]  reg_t;
  typedef logic [PCW-1:0] pc_t;

  typedef enum logic [1:0] {
    CLS_CTRL = 2'b00,
    CLS_ALU  = 2'b01,
    CLS_LIT  = 2'b10,
    CLS_MEM  = 2'b11
  } iclass_e;

  // Control-transfer OP field, bits 13:12
  typedef enum logic [1:0] {
    JOP_JF = 2'b00,
    JOP_JT = 2'b01,
    JOP_J  = 2'b10,
    JOP_NONE = 2'b11
  } jop_e;

  // COND field, bits 11:8. 1xxx selects external condition xxx.
  localparam logic [3:0] COND_TRUE    = 4'b0000;
  localparam logic [3:0] COND_NEG     = 4'b0100;
  localparam logic [3:0] COND_ZERO    = 4'b0101;
  localparam logic [3:0] COND_CARRY   = 4'b0110;
  localparam logic [3:0] COND_NEGZERO = 4'b0111;
  localparam logic [3:0] COND_EXT     = 4'b1000;

  // ALU opcodes (bits 10:6)
  localparam logic [4:0] OP_ADD      = 5'h00;
  localparam logic [4:0] OP_ADDINC   = 5'h01;
  localparam logic [4:0] OP_PASSA    = 5'h02;
  localparam logic [4:0] OP_INCA     = 5'h03;
  localparam logic [4:0] OP_SUBDEC   = 5'h04;
  localparam logic [4:0] OP_SUB      = 5'h05;
  localparam logic [4:0] OP_DECA     = 5'h06;
  localparam logic [4:0] OP_PASSA2   = 5'h07;
  localparam logic [4:0] OP_LSL      = 5'h08;
  localparam logic [4:0] OP_ASR      = 5'h09;
  localparam logic [4:0] OP_ZEROS    = 5'h10;
  localparam logic [4:0] OP_AND      = 5'h11;
  localparam logic [4:0] OP_ANDNOTA  = 5'h12;
  localparam logic [4:0] OP_PASSB    = 5'h13;
  localparam logic [4:0] OP_ANDNOTB  = 5'h14;
  localparam logic [4:0] OP_PASSA3   = 5'h15;
  localparam logic [4:0] OP_XOR      = 5'h16;
  localparam logic [4:0] OP_OR       = 5'h17;
  localparam logic [4:0] OP_NOR      = 5'h18;
  localparam logic [4:0] OP_XNOR     = 5'h19;
  localparam logic [4:0] OP_PASSNOTA = 5'h1A;
  localparam logic [4:0] OP_ORNOTA   = 5'h1B;
  localparam logic [4:0] OP_PASSNOTB = 5'h1C;
  localparam logic [4:0] OP_ORNOTB   = 5'h1D;
  localparam logic [4:0] OP_NAND     = 5'h1E;
  localparam logic [4:0] OP_ONES     = 5'h1F;

  // Memory opcodes (bits 10:6 of a class-11 instruction)
  localparam logic [4:0] MOP_LOAD  = 5'h08;
  localparam logic [4:0] MOP_STORE = 5'h10;

  // Condition flags
  typedef struct packed {
    logic neg;
    logic zero;
    logic carry;
  } flags_t;

  // Source of the value written back in W
  typedef enum logic [1:0] {
    WB_ALU = 2'b00,   // ALU result
    WB_LIT = 2'b01,   // literal
    WB_MEM = 2'b10    // load data
  } wbsel_e;

  // Control word produced in R for the E and W stages
  typedef struct packed {
    logic   valid;    // a real instruction occupies the stage
    logic   alu;      // ALU instruction: sets condition codes
    logic   we;       // writes register C
    reg_t   wc;       // destination register
    reg_t   ra;       // source A
    reg_t   rb;       // source B
    logic [4:0] op;   // ALU opcode
    wbsel_e wbsel;    // write-back source
    logic   load;     // memory read
    logic   store;    // memory write
    word_t  lit;      // zero-extended literal
  } ctl_t;

  // Forwarding mux select
  typedef enum logic [1:0] {
    FWD_RF   = 2'b00, // value read from the register file in R
    FWD_W    = 2'b01, // result of the instruction now in W
    FWD_PREV = 2'b10  // value written back in the previous cycle
  } fwd_sel_e;

  // Data-memory request issued in E
  typedef struct packed {
    logic  re;
    logic  we;
    word_t addr;
    word_t wdata;
  } dreq_t;

  // ---- instruction builders, used by testbenches and by anyone writing code
  function automatic instr_t enc_alu(logic [4:0] op, reg_t c, reg_t a, reg_t b);
    return {CLS_ALU, c, op, a, b};
  endfunction
  function automatic instr_t enc_lit(reg_t c, logic [10:0] lit);
    return {CLS_LIT, c, lit};
  endfunction
  function automatic instr_t enc_jmp(jop_e op, logic [3:0] cond, pc_t addr);
    return {CLS_CTRL, op, cond, addr};
  endfunction
  function automatic instr_t enc_load(reg_t c, reg_t a);
    return {CLS_MEM, c, MOP_LOAD, a, 3'd0};
  endfunction
  function automatic instr_t enc_store(reg_t a, reg_t b);
    return {CLS_MEM, 3'd0, MOP_STORE, a, b};
  endfunction
  localparam instr_t INSTR_NOP = 16'h0000;  // JF.TRUE 0x00

endpackage
