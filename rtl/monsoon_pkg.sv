// monsoon_pkg: shared types and constants of the Monsoon processing element.
//
// Holds the bit layouts of the token (144 bits: a 72-bit TAG and a 72-bit
// VALUE, each an 8-bit TYPE and a 64-bit immediate), of the pointer
// (PORT 1, MAP 7 = HASH 2 + N 5, IP 24, PE 10, FP 22), of the 32-bit macro
// instruction (OPCODE 10, r 10, PORT 1, s 11), and of the four microcontrol
// table entries (first level decode 24 bits, type code 2 bits, presence map
// entry 7 bits, second level decode entry).  Field widths and encodings are
// those of the architecture; the FALU opcode numbers other than the twelve
// comparisons are this design's own assignment (see the FALU constants).
// Packed structs list fields MSB first, in the order the field tables print
// them.
package monsoon_pkg;

  // ---------------------------------------------------------------- pointer
  typedef enum logic [1:0] {
    HASH_FP      = 2'b00,  // word interleaved data structures
    HASH_ALIAS   = 2'b01,  // aliased FP: constant data structures
    HASH_BASE    = 2'b10,  // base FP: loop constants, never changes PE
    HASH_IP      = 2'b11   // code hashing
  } hash_e;

  typedef struct packed {
    logic        port;  // 0 = l, 1 = r
    hash_e       hash;
    logic [4:0]  n;     // log2 of the subdomain size
    logic [23:0] ip;
    logic [9:0]  pe;
    logic [21:0] fp;
  } pointer_t;

  typedef struct packed {
    logic [7:0]  typ;
    logic [63:0] imm;
  } word_t;  // one 72-bit local memory word, a TAG or a VALUE

  typedef struct packed {
    logic [7:0] typ;
    pointer_t   ptr;
  } tag_t;

  typedef struct packed {
    tag_t  tag;
    word_t value;
  } token_t;

  // ------------------------------------------------------ macro instruction
  typedef struct packed {
    logic [9:0]  opcode;
    logic [9:0]  r;
    logic        port;
    logic [10:0] s;
  } instr_t;

  // --------------------------------------------------- first level decode
  typedef enum logic [1:0] {
    EA_FP   = 2'b00,  // FP + r
    EA_MASK = 2'b01,  // mask(FP) + r
    EA_IP   = 2'b10,  // IP + r
    EA_ABS  = 2'b11   // r
  } ea_mode_e;

  typedef struct packed {
    logic [10:0] base;
    logic [4:0]  tmap;
    logic [5:0]  pmap;
    ea_mode_e    ea;
  } fld_t;

  // -------------------------------------------------------- presence map
  typedef enum logic [1:0] {
    FOP_READ  = 2'b00,
    FOP_WRITE = 2'b01,
    FOP_EXCH  = 2'b10,
    FOP_ENQ   = 2'b11
  } fop_e;

  typedef struct packed {
    logic [1:0] bra;
    logic       fz;
    fop_e       fop;
    logic [1:0] next;
  } pent_t;

  // -------------------------------------------------- second level decode
  typedef enum logic [1:0] {
    UNIT_FALU = 2'b00,
    UNIT_PIU  = 2'b01,
    UNIT_TPU  = 2'b10,
    UNIT_MCU  = 2'b11
  } unit_e;

  typedef struct packed {
    logic       flip;
    unit_e      unit;
    logic [7:0] op;
  } fuctl_t;

  typedef struct packed {
    logic [1:0] na1;
    logic       na2;
  } nactl_t;

  typedef struct packed {
    logic [1:0] en1;
    logic [1:0] en2;
    logic [1:0] k1;
    logic [1:0] k2;
    logic       ord;
    logic [1:0] recirc;
    logic       stk;    // STACK
    logic       ack;
  } ftctl_t;

  // EMASK and the function unit status word share one layout; the status
  // word has no SENSE bit, so it is the low nine bits.
  typedef struct packed {
    logic sense;
    logic always_on;
    logic divz;
    logic uf;
    logic of;
    logic inx;
    logic nan;
    logic den;
    logic zero;
    logic neg;
  } emask_t;

  localparam int ST_ALWAYS = 8;
  localparam int ST_DIVZ   = 7;
  localparam int ST_UF     = 6;
  localparam int ST_OF     = 5;
  localparam int ST_INX    = 4;
  localparam int ST_NAN    = 3;
  localparam int ST_DEN    = 2;
  localparam int ST_ZERO   = 1;
  localparam int ST_NEG    = 0;

  typedef struct packed {
    fuctl_t      fuctl;
    nactl_t      nactl;
    ftctl_t      ftctl;
    logic [15:0] tmask;
    emask_t      emask;
    logic [3:0]  stats;
  } sld_t;

  localparam int SLD_W = $bits(sld_t);  // 57

  // ------------------------------------------------------ host load port
  typedef enum logic [2:0] {
    HSEL_LMEM = 3'd0,  // local memory word
    HSEL_PRES = 3'd1,  // one row of 32 presence bit pairs
    HSEL_FLD  = 3'd2,  // first level decode entry
    HSEL_TMAP = 3'd3,  // type map entry
    HSEL_PMAP = 3'd4,  // presence map entry
    HSEL_SLD  = 3'd5   // second level decode entry
  } host_sel_e;

  // --------------------------------------------------------- FALU opcodes
  // Comparisons carry the printed codes; bit 2 negates, bits 1:0 pick
  // EQ / LT / LEQ.  All other numbers are this design's assignment.
  localparam logic [7:0] OP_FDIV   = 8'h00;
  localparam logic [7:0] OP_FSQRT  = 8'h01;
  localparam logic [7:0] OP_FMUL   = 8'h02;
  localparam logic [7:0] OP_FMULAA = 8'h03;
  localparam logic [7:0] OP_FMULAB = 8'h04;
  localparam logic [7:0] OP_FMULA  = 8'h05;
  localparam logic [7:0] OP_FMIN   = 8'h06;
  localparam logic [7:0] OP_FMAX   = 8'h07;
  localparam logic [7:0] OP_FABS   = 8'h08;
  localparam logic [7:0] OP_FNEG   = 8'h09;
  localparam logic [7:0] OP_FPASS  = 8'h0A;
  localparam logic [7:0] OP_FADD   = 8'h0B;
  localparam logic [7:0] OP_FADDA  = 8'h0C;
  localparam logic [7:0] OP_FSUB   = 8'h0D;
  localparam logic [7:0] OP_FSUBR  = 8'h0E;
  localparam logic [7:0] OP_FSUBA  = 8'h0F;
  localparam logic [7:0] OP_FSUBRA = 8'h10;
  localparam logic [7:0] OP_FEQ    = 8'h18;
  localparam logic [7:0] OP_FLT    = 8'h19;
  localparam logic [7:0] OP_FLEQ   = 8'h1A;
  localparam logic [7:0] OP_FNEQ   = 8'h1C;
  localparam logic [7:0] OP_FGEQ   = 8'h1D;
  localparam logic [7:0] OP_FGT    = 8'h1E;
  localparam logic [7:0] OP_FCI    = 8'h20;
  localparam logic [7:0] OP_FCU    = 8'h21;
  localparam logic [7:0] OP_ICF    = 8'h22;
  localparam logic [7:0] OP_IUCF   = 8'h23;
  localparam logic [7:0] OP_FCTI   = 8'h24;
  localparam logic [7:0] OP_FCTU   = 8'h25;
  localparam logic [7:0] OP_FCICF  = 8'h26;
  localparam logic [7:0] OP_FCITCF = 8'h27;
  // 0x40..0x4F: the sixteen bitwise functions, OP[3:0] is the truth table
  // indexed by {A_i, B_i}: Y_i = OP[{A_i, B_i}].
  localparam logic [7:0] OP_BOOL   = 8'h40;
  localparam logic [7:0] OP_CLR    = 8'h40;
  localparam logic [7:0] OP_AND    = 8'h48;
  localparam logic [7:0] OP_XOR    = 8'h46;
  localparam logic [7:0] OP_OR     = 8'h4E;
  localparam logic [7:0] OP_PASSA  = 8'h4C;
  localparam logic [7:0] OP_PASSB  = 8'h4A;
  localparam logic [7:0] OP_SET    = 8'h4F;
  localparam logic [7:0] OP_LS     = 8'h50;  // logical shift, B > 0 left
  localparam logic [7:0] OP_ROT    = 8'h51;  // rotate left by B mod 64
  localparam logic [7:0] OP_REV    = 8'h52;  // bit reversal of A
  localparam logic [7:0] OP_IMUL   = 8'h80;
  localparam logic [7:0] OP_IMULU  = 8'h81;
  localparam logic [7:0] OP_IMULUB = 8'h82;
  localparam logic [7:0] OP_IADD   = 8'h83;
  localparam logic [7:0] OP_ISUB   = 8'h84;
  localparam logic [7:0] OP_ISUBR  = 8'h85;
  localparam logic [7:0] OP_IABS   = 8'h86;
  localparam logic [7:0] OP_INEG   = 8'h87;
  localparam logic [7:0] OP_IMAX   = 8'h88;
  localparam logic [7:0] OP_IMIN   = 8'h89;
  localparam logic [7:0] OP_IMAXU  = 8'h8A;
  localparam logic [7:0] OP_IMINU  = 8'h8B;
  localparam logic [7:0] OP_IPASSU = 8'h8C;
  localparam logic [7:0] OP_ISHIFT = 8'h8D;  // arithmetic shift, B > 0 left
  localparam logic [7:0] OP_IEQ    = 8'hB8;
  localparam logic [7:0] OP_ILT    = 8'hB9;
  localparam logic [7:0] OP_ILEQ   = 8'hBA;
  localparam logic [7:0] OP_INEQ   = 8'hBC;
  localparam logic [7:0] OP_IGEQ   = 8'hBD;
  localparam logic [7:0] OP_IGT    = 8'hBE;

  // --------------------------------------------------------- MCU opcodes
  // OP[7] = set (1) or get (0), OP[6:4] = class, OP[3:0] = register.
  localparam logic [2:0] MCU_CLASS_STACK = 3'd0;
  localparam logic [2:0] MCU_CLASS_EXC   = 3'd1;
  localparam logic [2:0] MCU_CLASS_STATS = 3'd2;

  // Stack control register numbers (OP[3:0] of the stack class).
  localparam logic [2:0] SREG_BASE0  = 3'd0;
  localparam logic [2:0] SREG_BASE1  = 3'd1;
  localparam logic [2:0] SREG_TOS0   = 3'd2;
  localparam logic [2:0] SREG_TOS1   = 3'd3;
  localparam logic [2:0] SREG_NOPOP0 = 3'd4;
  localparam logic [2:0] SREG_NOPOP1 = 3'd5;
  localparam logic [2:0] SREG_SWAP   = 3'd6;

  typedef struct packed {
    logic        valid;
    logic [2:0]  idx;
    logic [63:0] data;
  } stack_set_t;

  // Stack control register values as the MCU reads them.
  typedef struct packed {
    logic [63:0] base0;
    logic [63:0] base1;
    logic [63:0] tos0;
    logic [63:0] tos1;
    logic        nopop0;
    logic        nopop1;
    logic        swap;
  } stack_regs_t;

endpackage
