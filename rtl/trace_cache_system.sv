// trace_cache_system: a trace cache for a 2-wide superscalar DLX processor.
//
// The trace cache sits beside the processor's fetch stage. It copies the
// instructions the dispatcher accepts from the two fetch stage registers,
// packs them, in dynamic order, into short traces of at most SLOTS
// instructions holding at most one conditional branch (two basic blocks),
// and stores the traces in a direct-mapped memory of LINES lines. On every
// program-counter load of the fetch unit it reports whether the fetched
// instruction would have been found in the trace cache: as the first
// instruction of a line (first-tag hit), as a later instruction of the line
// last hit (content hit), or not at all (compulsory or conflict miss). It
// also gives the one or two instructions a hit would supply.
//
// Data flow:
//   fetch regs A/B --> tc_gather --> tc_fill_buffer --> tc_transfer --> tc_memory
//   fetch PC -------------------------------------------> tc_hit_logic <-/
//   all outcomes --> tc_stats
//
// Interface. Inputs are the fetch stage registers (valid, instruction, word
// address bits 31..2), the dispatcher's per-register accept strobes, the PC
// load strobe with the new PC, and the instruction cache's hit flag for the
// same access (counted for reference only). Outputs are the hit/miss
// outcome of the access and its supplied instructions, combinational in the
// access cycle, plus the counters of tc_stats.
//
// Timing: an instruction accepted by the dispatcher in cycle n is in the
// fill buffer after edge n+1; a trace closed at that edge is written to the
// memory at edge n+2 and can hit from cycle n+3 on.
//
// Default size: 4-instruction lines (the "TC_4" configuration), 4 lines and
// a 4-row fill buffer. The design was evaluated with 4- and 8-instruction
// lines and 4 to 512 lines; set SLOTS and LINES accordingly. As in the
// design, the trace cache is passive: it never stalls the processor and its
// instructions are not fed back into the pipeline here.
module trace_cache_system
  import tc_pkg::*;
#(
  parameter int unsigned SLOTS = 4,
  parameter int unsigned LINES = 4,
  parameter int unsigned ROWS  = 4,
  parameter int unsigned W     = 32,
  localparam int unsigned IDX_W  = (LINES > 1) ? $clog2(LINES) : 1,
  localparam int unsigned SLOT_W = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned CNT_W  = $clog2(SLOTS + 1),
  localparam int unsigned SUM_W  = $clog2(LINES * SLOTS + 1)
) (
  input  logic              clk,
  input  logic              rst,
  // fetch stage registers and dispatcher accept strobes
  input  logic              a_valid,
  input  word_t             a_instr,
  input  waddr_t            a_addr,
  input  logic              b_valid,
  input  word_t             b_instr,
  input  waddr_t            b_addr,
  input  logic              a_dispatch,
  input  logic              b_dispatch,
  // fetch access (program counter load)
  input  logic              pc_write,
  input  waddr_t            pc,
  input  logic              ic_hit,
  // access outcome
  output logic              first_tag_hit,
  output logic              content_hit,
  output logic              comp_miss,
  output logic              conf_miss,
  output logic [IDX_W-1:0]  hit_line,
  output logic [SLOT_W-1:0] hit_slot,
  output logic [1:0]        hit_count,
  output word_t             hit_instr [2],
  // counters
  output logic [W-1:0]      n_access,
  output logic [W-1:0]      n_ic_hit,
  output logic [W-1:0]      n_ftag_hit,
  output logic [W-1:0]      n_cont_hit,
  output logic [W-1:0]      n_comp_miss,
  output logic [W-1:0]      n_conf_miss,
  output logic [W-1:0]      n_write,
  output logic [W-1:0]      n_overwrite,
  output logic [W-1:0]      n_drop,
  output logic [W-1:0]      n_overflow,
  output logic [SUM_W-1:0]  space_used,
  input  logic [IDX_W-1:0]  line_sel,
  output logic [W-1:0]      l_comp_miss,
  output logic [W-1:0]      l_conf_miss,
  output logic [W-1:0]      l_write,
  output logic [W-1:0]      l_overwrite,
  output logic [CNT_W-1:0]  l_longest,
  output logic [W-1:0]      l_ftag_hit,
  output logic [W-1:0]      l_cont_hit,
  // fill-policy events of this cycle (rows closed by rule 1, 2, 3)
  output logic [1:0]        ev_rule1,
  output logic [1:0]        ev_rule2,
  output logic [1:0]        ev_rule3
);

  // gather -> fill buffer
  logic [1:0]        g_valid, g_branch, g_delim;
  word_t             g_instr [2];
  waddr_t            g_addr  [2];
  // fill buffer -> transfer
  logic              rd_valid, rd_br_exist;
  logic [CNT_W-1:0]  rd_size;
  logic [SLOT_W-1:0] rd_br_pos;
  word_t             rd_instr [SLOTS];
  waddr_t            rd_addr  [SLOTS];
  logic              overflow;
  // transfer <-> memory
  logic [IDX_W-1:0]  sel_idx, wr_idx;
  logic              sel_valid, wr_en, wr_br_exist;
  waddr_t            sel_tag1, sel_tag2, wr_tag1, wr_tag2;
  logic [SLOT_W-1:0] sel_size_m1, wr_size_m1, wr_br_pos;
  logic              ev_write, ev_overwrite, ev_drop_short, ev_drop_keep;
  // hit logic <-> memory
  logic [IDX_W-1:0]  lk_idx, hl_idx;
  logic              lk_valid, hl_valid, hl_br_exist;
  waddr_t            lk_tag1, hl_tag1, hl_tag2;
  logic [SLOT_W-1:0] hl_size_m1, hl_br_pos;
  word_t             lk_instr [SLOTS];
  word_t             hl_instr [SLOTS];

  tc_gather u_gather (
    .clk, .rst,
    .a_valid, .a_instr, .a_addr, .b_valid, .b_instr, .b_addr,
    .a_dispatch, .b_dispatch,
    .g_valid, .g_instr, .g_addr, .g_branch, .g_delim
  );

  tc_fill_buffer #(.ROWS(ROWS), .SLOTS(SLOTS)) u_fill (
    .clk, .rst,
    .g_valid, .g_instr, .g_addr, .g_branch, .g_delim,
    .rd_valid, .rd_size, .rd_br_exist, .rd_br_pos, .rd_instr, .rd_addr,
    .ev_rule1, .ev_rule2, .ev_rule3, .overflow
  );

  tc_transfer #(.LINES(LINES), .SLOTS(SLOTS)) u_xfer (
    .rd_valid, .rd_size, .rd_br_exist, .rd_br_pos, .rd_addr,
    .sel_idx, .line_valid(sel_valid), .line_tag1(sel_tag1),
    .line_tag2(sel_tag2), .line_size_m1(sel_size_m1),
    .wr_en, .wr_idx, .wr_tag1, .wr_tag2, .wr_size_m1, .wr_br_exist, .wr_br_pos,
    .ev_write, .ev_overwrite, .ev_drop_short, .ev_drop_keep
  );

  tc_memory #(.LINES(LINES), .SLOTS(SLOTS)) u_mem (
    .clk, .rst,
    .wr_en, .wr_idx, .wr_tag1, .wr_tag2, .wr_size_m1, .wr_br_exist, .wr_br_pos,
    .wr_instr(rd_instr),
    .lk_idx, .lk_valid, .lk_tag1, .lk_instr,
    .hl_idx, .hl_valid, .hl_tag1, .hl_tag2, .hl_size_m1, .hl_br_exist,
    .hl_br_pos, .hl_instr,
    .sel_idx, .sel_valid, .sel_tag1, .sel_tag2, .sel_size_m1
  );

  tc_hit_logic #(.LINES(LINES), .SLOTS(SLOTS)) u_hit (
    .clk, .rst,
    .acc_valid(pc_write), .acc_addr(pc),
    .lk_idx, .lk_valid, .lk_tag1, .lk_instr,
    .hl_idx, .hl_valid, .hl_tag1, .hl_tag2, .hl_size_m1, .hl_br_exist,
    .hl_br_pos, .hl_instr,
    .first_tag_hit, .content_hit, .comp_miss, .conf_miss,
    .hit_line, .hit_slot, .hit_count, .hit_instr
  );

  tc_stats #(.LINES(LINES), .SLOTS(SLOTS), .W(W)) u_stats (
    .clk, .rst,
    .acc_valid(pc_write), .ic_hit, .first_tag_hit, .content_hit,
    .comp_miss, .conf_miss, .acc_line(lk_idx), .hit_line,
    .ev_write, .ev_overwrite, .wr_line(wr_idx), .wr_size(rd_size),
    .ev_drop(ev_drop_short || ev_drop_keep), .ev_overflow(overflow),
    .n_access, .n_ic_hit, .n_ftag_hit, .n_cont_hit, .n_comp_miss,
    .n_conf_miss, .n_write, .n_overwrite, .n_drop, .n_overflow, .space_used,
    .line_sel, .l_comp_miss, .l_conf_miss, .l_write, .l_overwrite,
    .l_longest, .l_ftag_hit, .l_cont_hit
  );

endmodule
