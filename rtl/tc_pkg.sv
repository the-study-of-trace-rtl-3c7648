// tc_pkg: types, constants and helper functions shared by the trace cache.
//
// The trace cache watches the 2-wide fetch stage of a superscalar DLX
// processor. Instructions are 32-bit DLX words; instruction addresses are
// word aligned, so the trace cache keeps only address bits 31..2 (a "word
// address", waddr_t). The opcode field is bits 31..26 of the instruction.
//
// Only two opcode classes matter to the fill policy: conditional branches
// (BEQZ, BNEZ), which may sit inside a trace, and delimiters (J, JR, JAL,
// JALR, TRAP, RFE), which always end a trace. The numeric opcode values are
// those of the standard DLX encoding.
package tc_pkg;

  typedef logic [31:0] word_t;   // instruction word
  typedef logic [29:0] waddr_t;  // instruction address bits 31..2
  typedef logic [5:0]  opcode_t; // instruction bits 31..26

  // DLX primary opcodes used by the instruction classifier
  localparam opcode_t OP_J    = 6'h02;
  localparam opcode_t OP_JAL  = 6'h03;
  localparam opcode_t OP_BEQZ = 6'h04;
  localparam opcode_t OP_BNEZ = 6'h05;
  localparam opcode_t OP_RFE  = 6'h10;
  localparam opcode_t OP_TRAP = 6'h11;
  localparam opcode_t OP_JR   = 6'h12;
  localparam opcode_t OP_JALR = 6'h13;

  // Trace-relevant class of one instruction
  typedef enum logic [1:0] {
    IC_PLAIN  = 2'd0,  // anything else: just occupies a slot
    IC_BRANCH = 2'd1,  // conditional branch: at most one per trace
    IC_DELIM  = 2'd2   // jump / trap / rfe: ends the trace
  } iclass_t;

  function automatic iclass_t classify(opcode_t op);
    unique case (op)
      OP_BEQZ, OP_BNEZ:                           return IC_BRANCH;
      OP_J, OP_JR, OP_JAL, OP_JALR, OP_TRAP, OP_RFE: return IC_DELIM;
      default:                                    return IC_PLAIN;
    endcase
  endfunction

endpackage
