// msp430_pkg: types and constants shared by the compact MSP430 core.
//
// Holds the opcode encodings of the MSP430 instruction set (double-operand,
// single-operand and jump classes), the status register bit positions, the
// ALU operation codes and the decoded-instruction struct passed from the
// decoder to the controller. The encodings are those of the MSP430
// architecture; the ALU operation list and the struct layout are this
// design's own choices.
package msp430_pkg;

  // Status register (R2) bit positions.
  localparam int unsigned SR_C      = 0;
  localparam int unsigned SR_Z      = 1;
  localparam int unsigned SR_N      = 2;
  localparam int unsigned SR_GIE    = 3;
  localparam int unsigned SR_CPUOFF = 4;
  localparam int unsigned SR_OSCOFF = 5;
  localparam int unsigned SR_SCG0   = 6;
  localparam int unsigned SR_SCG1   = 7;
  localparam int unsigned SR_V      = 8;

  // Register numbers with a fixed role.
  localparam logic [3:0] REG_PC = 4'd0;
  localparam logic [3:0] REG_SP = 4'd1;
  localparam logic [3:0] REG_SR = 4'd2;
  localparam logic [3:0] REG_CG = 4'd3;

  // Addressing modes (As field; Ad uses only the first two).
  typedef enum logic [1:0] {
    AM_REG      = 2'b00,  // Rn
    AM_INDEXED  = 2'b01,  // X(Rn), symbolic X(PC), absolute &X
    AM_INDIRECT = 2'b10,  // @Rn
    AM_AUTOINC  = 2'b11   // @Rn+, immediate #N
  } amode_e;

  // Instruction classes after the first decode step.
  typedef enum logic [1:0] {
    CLS_DOUBLE  = 2'd0,   // format I, two operands
    CLS_SINGLE  = 2'd1,   // format II, one operand
    CLS_JUMP    = 2'd2,   // conditional / unconditional jump
    CLS_ILLEGAL = 2'd3
  } iclass_e;

  // Format I opcodes (IR[15:12]).
  typedef enum logic [3:0] {
    OP_MOV  = 4'h4, OP_ADD  = 4'h5, OP_ADDC = 4'h6, OP_SUBC = 4'h7,
    OP_SUB  = 4'h8, OP_CMP  = 4'h9, OP_DADD = 4'hA, OP_BIT  = 4'hB,
    OP_BIC  = 4'hC, OP_BIS  = 4'hD, OP_XOR  = 4'hE, OP_AND  = 4'hF
  } op1_e;

  // Format II opcodes (IR[9:7]).
  typedef enum logic [2:0] {
    OP_RRC = 3'd0, OP_SWPB = 3'd1, OP_RRA = 3'd2, OP_SXT = 3'd3,
    OP_PUSH = 3'd4, OP_CALL = 3'd5, OP_RETI = 3'd6, OP_ILL2 = 3'd7
  } op2_e;

  // Operations of the single shared ALU. The data operations follow the
  // instruction set; ALU_PASS_A and ALU_ADDR serve moves and the address and
  // pointer arithmetic that share the same adder.
  typedef enum logic [3:0] {
    ALU_PASS_A = 4'd0,   // result = a (MOV, PUSH/CALL data)
    ALU_ADD    = 4'd1,   // b + a
    ALU_ADDC   = 4'd2,   // b + a + C
    ALU_SUBC   = 4'd3,   // b + ~a + C
    ALU_SUB    = 4'd4,   // b + ~a + 1 (also CMP)
    ALU_DADD   = 4'd5,   // BCD b + a + C
    ALU_AND    = 4'd6,   // b & a (also BIT)
    ALU_BIC    = 4'd7,   // b & ~a
    ALU_BIS    = 4'd8,   // b | a
    ALU_XOR    = 4'd9,   // b ^ a
    ALU_RRC    = 4'd10,  // rotate a right through carry
    ALU_RRA    = 4'd11,  // arithmetic shift a right
    ALU_SWPB   = 4'd12,  // swap bytes of a
    ALU_SXT    = 4'd13   // sign-extend low byte of a
  } alu_op_e;

  // Instruction fields as the decoder delivers them.
  typedef struct packed {
    iclass_e    cls;
    logic [3:0] op1;     // format I opcode
    op2_e       op2;     // format II opcode
    logic [3:0] rs;      // source register (format II: the operand register)
    logic [3:0] rd;      // destination register
    amode_e     as;      // source addressing mode
    logic       ad;      // destination mode: 0 register, 1 indexed
    logic       bw;      // byte operation
    logic [2:0] cond;    // jump condition
    logic [15:0] joff;   // jump offset in bytes, sign-extended (2 * offset)
  } dec_t;

endpackage
