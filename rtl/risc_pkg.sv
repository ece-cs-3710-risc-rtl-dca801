// risc_pkg: shared types and constants of the 16-bit two-stage RISC core.
//
// Instruction format: [15:12] opcode, [11:8] Rdest (or condition), [7:4]
// extended opcode or ImmHi, [3:0] Rsrc or ImmLo. The opcode, extended-opcode
// and condition encodings below are the instruction set's; the internal
// enumerations (ALU operation, write-back source, flag update class) and the
// control bundle are this implementation's own.
package risc_pkg;

  typedef logic [15:0] word_t;
  typedef logic [3:0]  reg_addr_t;

  // Primary opcodes, bits [15:12]
  typedef enum logic [3:0] {
    OP_REG   = 4'h0, OP_ANDI  = 4'h1, OP_ORI   = 4'h2, OP_XORI  = 4'h3,
    OP_SPEC  = 4'h4, OP_ADDI  = 4'h5, OP_ADDUI = 4'h6, OP_ADDCI = 4'h7,
    OP_SHIFT = 4'h8, OP_SUBI  = 4'h9, OP_SUBCI = 4'hA, OP_CMPI  = 4'hB,
    OP_BCOND = 4'hC, OP_MOVI  = 4'hD, OP_MULI  = 4'hE, OP_LUI   = 4'hF
  } opcode_e;

  // Extended opcodes of the register class (opcode 0000), bits [7:4]
  localparam logic [3:0] RX_WAIT = 4'h0, RX_AND  = 4'h1, RX_OR   = 4'h2,
                         RX_XOR  = 4'h3, RX_ADD  = 4'h5, RX_ADDU = 4'h6,
                         RX_ADDC = 4'h7, RX_SUB  = 4'h9, RX_SUBC = 4'hA,
                         RX_CMP  = 4'hB, RX_MOV  = 4'hD, RX_MUL  = 4'hE;

  // Extended opcodes of the special class (opcode 0100), bits [7:4]
  localparam logic [3:0] SX_LOAD = 4'h0, SX_LPR  = 4'h1, SX_SNXB  = 4'h2,
                         SX_DI   = 4'h3, SX_STOR = 4'h4, SX_SPR   = 4'h5,
                         SX_ZRXB = 4'h6, SX_EI   = 4'h7, SX_JAL   = 4'h8,
                         SX_RETX = 4'h9, SX_TBIT = 4'hA, SX_EXCP  = 4'hB,
                         SX_JCOND = 4'hC, SX_SCOND = 4'hD, SX_TBITI = 4'hE;

  // Extended opcodes of the shift class (opcode 1000), bits [7:4].
  // LSHI is 000s and ASHUI is 001s, s being the sign of the shift count.
  localparam logic [3:0] HX_LSH = 4'h4, HX_ASHU = 4'h6;

  // Condition codes (Bcond, Jcond, Scond)
  typedef enum logic [3:0] {
    C_EQ = 4'h0, C_NE = 4'h1, C_CS = 4'h2, C_CC = 4'h3,
    C_HI = 4'h4, C_LS = 4'h5, C_GT = 4'h6, C_LE = 4'h7,
    C_FS = 4'h8, C_FC = 4'h9, C_LO = 4'hA, C_HS = 4'hB,
    C_LT = 4'hC, C_GE = 4'hD, C_UC = 4'hE, C_NV = 4'hF
  } cond_e;

  // Program status register bit positions: rrrr I P E 0 N Z F 0 0 L T C
  localparam int PSR_C = 0, PSR_T = 1, PSR_L = 2, PSR_F = 5, PSR_Z = 6,
                 PSR_N = 7, PSR_E = 9, PSR_P = 10, PSR_I = 11;
  // Bits that exist; reserved and zero bits always read 0
  localparam word_t PSR_MASK = 16'h0EE7;

  typedef struct packed {
    logic n;
    logic z;
    logic f;
    logic l;
    logic c;
  } flags_t;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_ADDC, ALU_SUB, ALU_SUBC, ALU_AND, ALU_OR, ALU_XOR,
    ALU_MOV, ALU_MUL, ALU_LUI, ALU_SNXB, ALU_ZRXB
  } alu_op_e;

  // Which PSR flags an instruction writes
  typedef enum logic [1:0] {
    FL_NONE,   // no flag changes
    FL_ARITH,  // C and F (ADD, ADDC, SUB, SUBC and immediates)
    FL_CMP,    // Z, L and N (CMP, CMPI)
    FL_TBIT    // F only (TBIT, TBITI)
  } flag_upd_e;

  // Source of the B operand
  typedef enum logic [1:0] { B_REG, B_SEXT, B_ZEXT } bsel_e;

  // Source of the register write-back value
  typedef enum logic [2:0] { WB_ALU, WB_SHIFT, WB_MEM, WB_LINK, WB_PSR, WB_COND } wbsel_e;

  // Change of control flow
  typedef enum logic [1:0] { BR_NONE, BR_BCOND, BR_JCOND, BR_JAL } br_e;

  typedef struct packed {
    logic      rf_we;     // write a register
    reg_addr_t ra;        // read port A: bits [11:8]
    reg_addr_t rb;        // read port B: bits [3:0]
    reg_addr_t wa;        // write register
    bsel_e     bsel;
    alu_op_e   alu_op;
    wbsel_e    wbsel;
    flag_upd_e flag_upd;
    logic      sh_arith;  // ASHU/ASHUI
    logic      sh_imm;    // shift count from the instruction
    logic      mem_re;    // LOAD
    logic      mem_we;    // STOR
    br_e       br;
    logic [3:0] cond;
    logic      tbit_imm;  // TBITI: offset from the instruction
    logic      lpr;
    logic      ei;
    logic      di;
    logic      halt;      // WAIT
    logic [7:0] imm;
  } ctrl_t;

endpackage
