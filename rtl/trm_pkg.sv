// trm_pkg: shared types and constants of the TRM (Tiny Register Machine).
//
// The TRM executes 18-bit instructions. Field layout used throughout:
//   [17:14] op      operation (table below)
//   [13:11] rd      destination / second source register (called B)
//   [10]    isReg   1: operand A is register rs, 0: operand A is the immediate
//   [9:0]   imm     10-bit immediate, zero extended
//   [9:3]   offset  7-bit load/store offset, zero extended
//   [2:0]   rs      source register (operand A, or load/store base)
//   [13:10] cond    condition of a conditional branch (this design's choice)
//   [9:0]   boff    signed conditional branch offset
//   [13:0]  bloff   signed branch-and-link offset
// Opcode values follow the document's control-path table; the NOP that is
// issued while reset is held and the condition-code numbering are this
// design's own choice.
package trm_pkg;

  typedef enum logic [3:0] {
    OP_MOV = 4'd0,  OP_NOT = 4'd1,  OP_ADD = 4'd2,  OP_SUB = 4'd3,
    OP_AND = 4'd4,  OP_BIC = 4'd5,  OP_OR  = 4'd6,  OP_XOR = 4'd7,
    OP_MUL = 4'd8,  OP_R9  = 4'd9,  OP_ROR = 4'd10, OP_BR  = 4'd11,
    OP_LD  = 4'd12, OP_ST  = 4'd13, OP_BC  = 4'd14, OP_BL  = 4'd15
  } op_e;

  // Condition codes of the conditional branch (ARM-style numbering).
  typedef enum logic [3:0] {
    C_EQ = 4'd0,  C_NE = 4'd1,  C_CS = 4'd2,  C_CC = 4'd3,
    C_MI = 4'd4,  C_PL = 4'd5,  C_VS = 4'd6,  C_VC = 4'd7,
    C_HI = 4'd8,  C_LS = 4'd9,  C_GE = 4'd10, C_LT = 4'd11,
    C_GT = 4'd12, C_LE = 4'd13, C_AL = 4'd14, C_NV = 4'd15
  } cond_e;

  localparam int unsigned IW    = 18;   // instruction width
  localparam int unsigned DW    = 32;   // data word width
  localparam int unsigned BLS   = 14;   // branch-and-link offset width
  localparam int unsigned IOW   = 6;    // I/O address width: uppermost 2^6 words
  localparam logic [2:0]  LR    = 3'd7; // link register

  // MOV r0, r0 (register form): issued while reset is held.
  localparam logic [IW-1:0] NOP = 18'h00400;

  // Condition flags.
  typedef struct packed {
    logic n;
    logic z;
    logic c;
    logic v;
  } flags_t;

  // Decoded control signals (names follow the document's control path).
  typedef struct packed {
    logic       mov, inv, add, sub, band, bic, bor, bxor;
    logic       mul, ror, br, blr, ldr, st, bc, bl, ldh;
    logic       vector;
    logic       is_reg;
    logic [2:0] ird;
    logic [2:0] irs;
    logic [2:0] dst;
    logic [3:0] cond;
  } ctrl_t;

  function automatic logic cond_true(input logic [3:0] c, input flags_t f);
    unique case (c)
      C_EQ: return f.z;
      C_NE: return ~f.z;
      C_CS: return f.c;
      C_CC: return ~f.c;
      C_MI: return f.n;
      C_PL: return ~f.n;
      C_VS: return f.v;
      C_VC: return ~f.v;
      C_HI: return f.c & ~f.z;
      C_LS: return ~f.c | f.z;
      C_GE: return f.n == f.v;
      C_LT: return f.n != f.v;
      C_GT: return ~f.z & (f.n == f.v);
      C_LE: return f.z | (f.n != f.v);
      C_AL: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

endpackage
