// isa_pkg: shared types and constants of the 32-bit word machine.
//
// The instruction set numbers bits from the most significant end: bit 0 of
// a word is its MSB and bit 31 its LSB. Every packed struct below lists its
// fields in that order, so a field that the instruction set places at bits
// 0..6 lands at [31:25] of a logic [31:0] word.
//
//   instruction : P(7) opcode | S(1) indirect | R(4) | A(4) | N(16, signed)
//   flags word  : 28 unused bits | INTR | NEG | ZERO | RUN  (RUN is the LSB)
//   selector    : L(8) length in bits | S(24) start position in bits
//
// Opcode values, condition codes, register names and the three word layouts
// are those of the instruction set. The console channel kinds (out_kind_e,
// in_kind_e) belong to this implementation's I/O interface.
package isa_pkg;

  // Register numbers of the named registers.
  localparam logic [3:0] REG_FP = 4'd13;
  localparam logic [3:0] REG_SP = 4'd14;
  localparam logic [3:0] REG_PC = 4'd15;

  typedef enum logic [6:0] {
    OP_BAD    = 7'd0,
    OP_LOAD   = 7'd1,
    OP_LOADH  = 7'd2,
    OP_STORE  = 7'd3,
    OP_ZERO   = 7'd4,
    OP_ADD    = 7'd5,
    OP_SUB    = 7'd6,
    OP_MUL    = 7'd7,
    OP_DIV    = 7'd8,
    OP_MOD    = 7'd9,
    OP_RSUB   = 7'd10,
    OP_RDIV   = 7'd11,
    OP_RMOD   = 7'd12,
    OP_INC    = 7'd13,
    OP_DEC    = 7'd14,
    OP_CMP    = 7'd15,
    OP_RCMP   = 7'd16,
    OP_CMPZ   = 7'd17,
    OP_JUMP   = 7'd18,
    OP_JCOND  = 7'd19,
    OP_JCNDF  = 7'd20,
    OP_PUSH   = 7'd21,
    OP_POP    = 7'd22,
    OP_PUSHA  = 7'd23,
    OP_POPA   = 7'd24,
    OP_CALL   = 7'd25,
    OP_RET    = 7'd26,
    OP_AND    = 7'd27,
    OP_OR     = 7'd28,
    OP_XOR    = 7'd29,
    OP_NOT    = 7'd30,
    OP_NEG    = 7'd31,
    OP_LDFLS  = 7'd32,
    OP_STFLS  = 7'd33,
    OP_ANDTF  = 7'd34,
    OP_STOREH = 7'd35,
    OP_GTBOF  = 7'd36,
    OP_GTBFR  = 7'd37,
    OP_PTBOF  = 7'd38,
    OP_PTBFR  = 7'd39,
    OP_SHL    = 7'd40,
    OP_ASHL   = 7'd41,
    OP_ROTL   = 7'd42,
    OP_SHR    = 7'd43,
    OP_ASHR   = 7'd44,
    OP_ROTR   = 7'd45,
    OP_MKSEL  = 7'd46,
    OP_MIN    = 7'd48,
    OP_MAX    = 7'd49,
    OP_LDVRZ  = 7'd50,
    OP_INCR   = 7'd51,
    OP_DECR   = 7'd52,
    OP_OUTN   = 7'd120,
    OP_OUTCH  = 7'd121,
    OP_OUTS   = 7'd122,
    OP_INN    = 7'd123,
    OP_INCH   = 7'd124,
    OP_OUT    = 7'd125,
    OP_HALT   = 7'd127
  } opcode_e;

  // Condition codes carried in the R field of JCOND / JCNDF.
  typedef enum logic [3:0] {
    COND_Z    = 4'd0,   // also EQ
    COND_NZ   = 4'd1,   // also NE
    COND_LT   = 4'd2,   // also NEG
    COND_LE   = 4'd3,
    COND_GT   = 4'd4,
    COND_GE   = 4'd5,   // also POS
    COND_INTR = 4'd6
  } cond_e;

  typedef struct packed {
    logic [6:0]  op;     // P
    logic        star;   // S
    logic [3:0]  r;      // R
    logic [3:0]  a;      // A
    logic [15:0] n;      // N
  } instr_t;

  typedef struct packed {
    logic [27:0] unused;
    logic        intr;
    logic        neg;
    logic        zero;
    logic        run;
  } flags_t;

  typedef struct packed {
    logic [7:0]  len;
    logic [23:0] start;
  } selector_t;

  // Operations of the ALU block.
  typedef enum logic [3:0] {
    ALU_PASS_B, // y = b
    ALU_ADD,    // y = a + b
    ALU_SUB,    // y = a - b
    ALU_RSUB,   // y = b - a
    ALU_MUL,    // y = a * b (low 32 bits)
    ALU_NEG,    // y = -b
    ALU_AND,
    ALU_OR,
    ALU_XOR,
    ALU_NOT,    // y = ~b
    ALU_MIN,    // signed
    ALU_MAX,    // signed
    ALU_INC,    // y = a + 1
    ALU_DEC     // y = a - 1
  } alu_op_e;

  // Shift kinds of the shifter block.
  typedef enum logic [2:0] {
    SH_SHL, SH_ASHL, SH_ROTL, SH_SHR, SH_ASHR, SH_ROTR
  } shift_op_e;

  // What a word on the console output channel means.
  typedef enum logic [1:0] {
    OUT_NUM,    // OUTN: print as a decimal number
    OUT_CHAR,   // OUTCH / OUTS: print low 8 bits as a character
    OUT_DBG_PC, // OUT: the PC value
    OUT_DBG_OV  // OUT: the operand value
  } out_kind_e;

  // What the core asks the keyboard for.
  typedef enum logic {
    IN_NUM,     // INN: a decimal number, delivered as a 32-bit value
    IN_CHAR     // INCH: one character code
  } in_kind_e;

endpackage
