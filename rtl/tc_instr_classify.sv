// tc_instr_classify: decodes the opcode of one DLX instruction into the two
// flags the fill policy needs.
//
//   is_branch - BEQZ or BNEZ, a conditional branch. A trace may hold one.
//   is_delim  - J, JR, JAL, JALR, TRAP or RFE. Such an instruction is placed
//               in the trace and then ends it.
//
// Only the opcode field (bits 31..26) is looked at; the rest of the word is
// unused here, which is why a lint tool reports it. Purely combinational;
// the flags are mutually exclusive. The opcode classes
// follow the fill policy of the design; the numeric opcode values are the
// standard DLX encoding (see tc_pkg).
module tc_instr_classify
  import tc_pkg::*;
(
  input  word_t instr,
  output logic  is_branch,
  output logic  is_delim
);

  iclass_t cls;

  always_comb begin
    cls       = classify(instr[31:26]);
    is_branch = (cls == IC_BRANCH);
    is_delim  = (cls == IC_DELIM);
  end

endmodule
