// tc_gather: instruction gathering unit.
//
// The fetch unit holds up to two instructions, in stage registers A (older)
// and B (younger). The dispatcher may take both, only A, or none in a cycle;
// an instruction left behind stays in its stage register and is offered
// again in a later cycle. To copy every instruction into the trace exactly
// once, this unit takes an instruction only in the cycle in which the
// dispatcher accepts it (stage valid AND dispatch strobe).
//
// The accepted instructions are packed in program order: out slot 0 holds
// the older accepted instruction, out slot 1 the younger one, so a cycle in
// which only B is accepted presents B in slot 0. Each output carries the
// instruction, its word address and the branch / delimiter flags from
// tc_instr_classify.
//
// Timing: one register stage. What is accepted in cycle n appears on the
// outputs in cycle n+1 for one cycle. Synchronous active-high reset clears
// the output valids.
//
// The selection rule (collect what the dispatcher accepts, once) follows the
// design; using a register stage and a per-stage dispatch strobe as the
// "control signals from the dispatcher" is this implementation's choice.
module tc_gather
  import tc_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  // fetch stage registers
  input  logic      a_valid,
  input  word_t     a_instr,
  input  waddr_t    a_addr,
  input  logic      b_valid,
  input  word_t     b_instr,
  input  waddr_t    b_addr,
  // dispatcher acceptance this cycle
  input  logic      a_dispatch,
  input  logic      b_dispatch,
  // gathered instructions, program order
  output logic [1:0] g_valid,
  output word_t      g_instr  [2],
  output waddr_t     g_addr   [2],
  output logic [1:0] g_branch,
  output logic [1:0] g_delim
);

  logic take_a, take_b;
  logic a_br, a_dl, b_br, b_dl;

  tc_instr_classify u_cls_a (.instr(a_instr), .is_branch(a_br), .is_delim(a_dl));
  tc_instr_classify u_cls_b (.instr(b_instr), .is_branch(b_br), .is_delim(b_dl));

  assign take_a = a_valid && a_dispatch;
  assign take_b = b_valid && b_dispatch;

  always_ff @(posedge clk) begin
    if (rst) begin
      g_valid  <= '0;
      g_branch <= '0;
      g_delim  <= '0;
      g_instr  <= '{default: '0};
      g_addr   <= '{default: '0};
    end else begin
      g_valid <= {take_a && take_b, take_a || take_b};
      if (take_a) begin
        g_instr[0]  <= a_instr;
        g_addr[0]   <= a_addr;
        g_branch[0] <= a_br;
        g_delim[0]  <= a_dl;
        g_instr[1]  <= b_instr;
        g_addr[1]   <= b_addr;
        g_branch[1] <= b_br && take_b;
        g_delim[1]  <= b_dl && take_b;
      end else begin
        g_instr[0]  <= b_instr;
        g_addr[0]   <= b_addr;
        g_branch[0] <= b_br && take_b;
        g_delim[0]  <= b_dl && take_b;
        g_instr[1]  <= '0;
        g_addr[1]   <= '0;
        g_branch[1] <= 1'b0;
        g_delim[1]  <= 1'b0;
      end
    end
  end

endmodule
