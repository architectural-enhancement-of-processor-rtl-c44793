// risc_pkg: shared types and constants of the enhanced 16F84-class processor.
//
// The instruction word is 15 bits wide. Bit 14 selects the instruction class:
// 0 = the classic 14-bit 16F84 instruction held in bits 13:0 (8-bit ALU),
// 1 = an extended instruction, executed by the 16-bit co-operative ALU
// (CALU) or by the 8x8 multiplier. The 15-bit word and the role of its MSB
// follow the source design; the encoding of the extended group (re-using the
// 16F84 byte-operation opcode in bits 13:8) is this design's own choice.
//
// File-register map (bits 6:0 of the address; both banks mirror it):
//   0x00 INDF, 0x02 PCL, 0x03 STATUS, 0x04 FSR, 0x0A PCLATH   (16F84 SFRs)
//   0x0C..0x4F general-purpose RAM (68 bytes, as in the 16F84)
//   0x50..0x55 CALU A_L, A_H, B_L, B_H, S_L, S_H  (S is read-only)
//   0x56..0x57 PRODL, PRODH multiplier product     (read-only)
// The placement of the CALU and product registers in the unused space
// above the 16F84 RAM is this design's own choice.
package risc_pkg;

  localparam int unsigned IW      = 15;  // instruction width
  localparam int unsigned PCW     = 13;  // program counter width
  localparam int unsigned RAW     = 9;   // file-register address width {bank, f}

  localparam logic [IW-1:0] INSTR_NOP = '0;

  // SFR addresses (bits 6:0)
  localparam logic [6:0] A_INDF   = 7'h00;
  localparam logic [6:0] A_PCL    = 7'h02;
  localparam logic [6:0] A_STATUS = 7'h03;
  localparam logic [6:0] A_FSR    = 7'h04;
  localparam logic [6:0] A_PCLATH = 7'h0A;
  localparam logic [6:0] A_GPR_LO = 7'h0C;
  localparam logic [6:0] A_GPR_HI = 7'h4F;
  localparam logic [6:0] A_CALU   = 7'h50;  // base of A_L..S_H (6 registers)
  localparam logic [6:0] A_PRODL  = 7'h56;
  localparam logic [6:0] A_PRODH  = 7'h57;

  // STATUS bit positions
  localparam int unsigned ST_C   = 0;
  localparam int unsigned ST_DC  = 1;
  localparam int unsigned ST_Z   = 2;
  localparam int unsigned ST_RP0 = 5;
  localparam int unsigned ST_IRP = 7;
  localparam logic [7:0] STATUS_RESET = 8'h18;  // TO = PD = 1

  // 8-bit ALU operations. Operand a is the file register or the literal,
  // operand b is W.
  typedef enum logic [4:0] {
    ALU_PASS_A, ALU_PASS_B, ALU_CLR,
    ALU_ADD, ALU_SUB,            // a + b, a - b
    ALU_AND, ALU_IOR, ALU_XOR,
    ALU_COM, ALU_INC, ALU_DEC,
    ALU_RLF, ALU_RRF, ALU_SWAP,
    ALU_BCF, ALU_BSF, ALU_BTST
  } alu_op_e;

  // 16-bit CALU operations: S = f(A, B). The codes are the 16F84 opcodes
  // (instruction bits 13:8) of the matching byte operation.
  typedef enum logic [5:0] {
    CALU_SUB  = 6'b000010,
    CALU_DEC  = 6'b000011,
    CALU_IOR  = 6'b000100,
    CALU_AND  = 6'b000101,
    CALU_XOR  = 6'b000110,
    CALU_ADD  = 6'b000111,
    CALU_COM  = 6'b001001,
    CALU_INC  = 6'b001010,
    CALU_RR   = 6'b001100,
    CALU_RL   = 6'b001101,
    CALU_SWAP = 6'b001110
  } calu_op_e;

  // Extended opcode of the multiply instruction MULWF f (PROD = W * f)
  localparam logic [5:0] XOP_MUL = 6'b110000;

  // Decoded control word of one instruction
  typedef struct packed {
    logic     valid_calu;  // extended instruction executed by the CALU
    logic     is_mul;      // MULWF
    calu_op_e calu_op;
    alu_op_e  alu_op;
    logic     use_lit;     // ALU operand a is the 8-bit literal
    logic     reads_f;     // operand a is read from the file register
    logic     wr_w;        // result written to W
    logic     wr_f;        // result written to the file register
    logic     upd_z;
    logic     upd_c;
    logic     upd_dc;
    logic     skip_z;      // skip next instruction if ALU result is zero
    logic     skip_nz;     // skip next instruction if ALU result is non-zero
    logic     is_goto;
    logic     is_call;
    logic     is_return;
  } ctrl_t;

endpackage
