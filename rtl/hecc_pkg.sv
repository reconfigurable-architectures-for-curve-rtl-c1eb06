// hecc_pkg: shared constants and types of the GF(2^83) HECC co-processor.
//
// The field size (83 bits) and the 84-bit word length of the input-word and
// output-word registers, the 128 x 32-bit local storage and its 7-bit address
// follow the design description. The reduction polynomial
// x^83 + x^7 + x^4 + x^2 + 1 and the instruction encoding are this design's
// own choices: the description names neither.
//
// Instruction byte on the instruction port:
//   [7]   toggle : a new instruction is recognised when this bit differs from
//                  the toggle of the last accepted instruction
//   [6:4] opcode : see opcode_e
//   [3:0] sub    : operand register (SETREG) or datapath operation (EXEC)
package hecc_pkg;

  localparam int unsigned FIELD_M    = 83;        // GF(2^83)
  localparam int unsigned WORD_W     = 84;        // input/output word registers
  localparam int unsigned RAM_W      = 32;        // local storage word width
  localparam int unsigned RAM_DEPTH  = 128;       // local storage locations
  localparam int unsigned RAM_AW     = 7;         // local storage address bits
  localparam int unsigned NVARS      = 32;        // field variables in storage
  localparam int unsigned VAR_AW     = 5;         // variable number bits
  localparam int unsigned WORDS_USED = 3;         // 32-bit words holding 84 bits

  // Reduction polynomial without its x^83 term.
  localparam logic [FIELD_M-1:0] FIELD_POLY_LOW = FIELD_M'((1 << 7) | (1 << 4) | (1 << 2) | 1);

  typedef enum logic [2:0] {
    OP_NOP      = 3'd0,  // do nothing (still consumes the toggle)
    OP_INSHIFT  = 3'd1,  // input word <= {input word, data-in byte}
    OP_WRITE    = 3'd2,  // storage[var] <= input word
    OP_READ     = 3'd3,  // output word <= storage[var]
    OP_OUTSHIFT = 3'd4,  // output word >>= 8 (next byte on data-out)
    OP_SETREG   = 3'd5,  // operand register sub[1:0] <= var
    OP_EXEC     = 3'd6,  // run datapath operation sub[1:0]
    OP_RSVD     = 3'd7   // reserved, treated as NOP
  } opcode_e;

  // Operand address registers set by OP_SETREG.
  typedef enum logic [1:0] {
    REG_A = 2'd0,
    REG_B = 2'd1,
    REG_C = 2'd2,
    REG_D = 2'd3
  } opreg_e;

  // Datapath operations run by OP_EXEC; D is always the destination.
  typedef enum logic [1:0] {
    DP_MUL    = 2'd0,  // D = A * B
    DP_MULADD = 2'd1,  // D = A * B + C
    DP_ADD    = 2'd2,  // D = A + B
    DP_SQR    = 2'd3   // D = A * A
  } dpop_e;

  typedef struct packed {
    logic       toggle;
    opcode_e    opcode;
    logic [3:0] sub;
  } instr_t;

endpackage
