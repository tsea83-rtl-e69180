// pipe_pkg: instruction-word layout shared by the pipelined CPU front end
// (pipe_cpu) and its program memory (pipe_pm).
//
// An instruction is 32 bits. The opcode sits in bits 31:26; the jump
// constant K is the 11-bit two's-complement field in bits 10:0. Both field
// positions follow from the encoded test program (J 0 at address 2 is
// 0x540007FE: opcode 0x15, K = 0x7FE = -2); the field names and the
// opcode values other than J and NOP are this design's choice.
package pipe_pkg;

  localparam int unsigned INSTR_W = 32;
  localparam int unsigned K_W     = 11;

  typedef enum logic [5:0] {
    OP_NOP = 6'd0,   // all-zero word
    OP_D1  = 6'd1,   // placeholder instructions used by the test program
    OP_D2  = 6'd2,
    OP_D3  = 6'd3,
    OP_D4  = 6'd4,
    OP_J   = 6'd21   // relative jump: PC := PC_of_jump + K
  } opcode_e;

  // Instruction word: opcode, an operand field this front end does not
  // decode, and the jump constant K.
  typedef struct packed {
    opcode_e                op;
    logic [INSTR_W-K_W-7:0] operands;
    logic [K_W-1:0]         k;
  } instr_t;

endpackage
