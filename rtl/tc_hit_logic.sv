// tc_hit_logic: trace cache hit logic.
//
// The processor's fetch unit is left as it is; every time it loads its
// program counter (an "access", acc_valid) this unit decides whether the
// instruction at that address could have come from the trace cache.
//
// First-tag hit: the line indexed by the fetch address is valid and its
// tag1 equals the fetch address. The line is then remembered (line-hit
// flag, line index, its tag1, and the next slot that may still hit).
//
// Content hit: no first-tag hit, the line-hit flag is set, the remembered
// line still holds the same trace, and the fetch address equals the address
// of a later slot j of that trace (j >= the next-slot pointer, j < size).
// The trace keeps no per-slot addresses; slot j's address is rebuilt from
// the trace information:
//     j <= br_pos, or no branch:  tag1 + j
//     j >  br_pos:                tag2 + (j - br_pos - 1)
// After a content hit on slot j the next-slot pointer becomes j+1, so a
// trace is followed forwards as the 2-wide fetch walks through it.
//
// Miss: neither hit. It is compulsory when the indexed line is invalid and
// a conflict miss when it holds another trace. Any miss, and any access
// while the remembered line has changed, clears the line-hit flag.
//
// Outputs also give the matched slot and up to two instructions from it
// (hit_instr[0] at the matched slot, hit_instr[1] at the next slot, with
// hit_count = 1 or 2), which is what a trace cache would supply to the
// 2-wide fetch path.
//
// Timing: outputs are combinational in the access cycle; the line-hit state
// updates at the clock edge. Synchronous active-high reset clears the flag.
//
// The two hit kinds, the line-hit flag and the miss kinds follow the design;
// the slot-address reconstruction, the forward-only next-slot pointer and
// first-tag priority are this implementation's choices.
module tc_hit_logic
  import tc_pkg::*;
#(
  parameter int unsigned LINES = 4,
  parameter int unsigned SLOTS = 4,
  localparam int unsigned IDX_W  = (LINES > 1) ? $clog2(LINES) : 1,
  localparam int unsigned SLOT_W = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic              clk,
  input  logic              rst,
  // fetch access
  input  logic              acc_valid,
  input  waddr_t            acc_addr,
  // lookup of the indexed line
  output logic [IDX_W-1:0]  lk_idx,
  input  logic              lk_valid,
  input  waddr_t            lk_tag1,
  input  word_t             lk_instr [SLOTS],
  // the remembered (hit) line
  output logic [IDX_W-1:0]  hl_idx,
  input  logic              hl_valid,
  input  waddr_t            hl_tag1,
  input  waddr_t            hl_tag2,
  input  logic [SLOT_W-1:0] hl_size_m1,
  input  logic              hl_br_exist,
  input  logic [SLOT_W-1:0] hl_br_pos,
  input  word_t             hl_instr [SLOTS],
  // result of the access
  output logic              first_tag_hit,
  output logic              content_hit,
  output logic              comp_miss,
  output logic              conf_miss,
  output logic [IDX_W-1:0]  hit_line,
  output logic [SLOT_W-1:0] hit_slot,
  output logic [1:0]        hit_count,
  output word_t             hit_instr [2]
);

  logic              lh_flag;
  logic [IDX_W-1:0]  lh_idx;
  waddr_t            lh_tag1;
  logic [SLOT_W:0]   lh_next;

  waddr_t            slot_addr [SLOTS];
  logic              match;
  logic [SLOT_W-1:0] match_slot;
  logic              same_line;
  logic [SLOT_W:0]   size;

  assign lk_idx = IDX_W'(acc_addr);
  assign hl_idx = lh_idx;

  always_comb begin
    size = (SLOT_W+1)'(hl_size_m1) + 1'b1;
    for (int j = 0; j < SLOTS; j++) begin
      if (!hl_br_exist || (SLOT_W+1)'(j) <= (SLOT_W+1)'(hl_br_pos))
        slot_addr[j] = hl_tag1 + waddr_t'(j);
      else
        slot_addr[j] = hl_tag2 + waddr_t'(j) - waddr_t'(hl_br_pos) - 1'b1;
    end
    match      = 1'b0;
    match_slot = '0;
    for (int j = SLOTS - 1; j >= 1; j--) begin
      if ((SLOT_W+1)'(j) < size && (SLOT_W+1)'(j) >= lh_next &&
          slot_addr[j] == acc_addr) begin
        match      = 1'b1;
        match_slot = SLOT_W'(j);
      end
    end
    same_line = lh_flag && hl_valid && (hl_tag1 == lh_tag1);

    first_tag_hit = acc_valid && lk_valid && (lk_tag1 == acc_addr);
    content_hit   = acc_valid && !first_tag_hit && same_line && match;
    comp_miss     = acc_valid && !first_tag_hit && !content_hit && !lk_valid;
    conf_miss     = acc_valid && !first_tag_hit && !content_hit && lk_valid;

    hit_line  = first_tag_hit ? lk_idx : lh_idx;
    hit_slot  = first_tag_hit ? '0 : match_slot;
    hit_instr = '{default: '0};
    hit_count = 2'd0;
    if (first_tag_hit) begin
      hit_instr[0] = lk_instr[0];
      hit_instr[1] = lk_instr[1];
      hit_count    = 2'd2;         // a stored trace holds at least two
    end else if (content_hit) begin
      hit_instr[0] = hl_instr[match_slot];
      hit_count    = 2'd1;
      if ((SLOT_W+1)'(match_slot) + 1'b1 < size) begin
        hit_instr[1] = hl_instr[match_slot + 1'b1];
        hit_count    = 2'd2;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lh_flag <= 1'b0;
      lh_idx  <= '0;
      lh_tag1 <= '0;
      lh_next <= '0;
    end else if (acc_valid) begin
      if (first_tag_hit) begin
        lh_flag <= 1'b1;
        lh_idx  <= lk_idx;
        lh_tag1 <= acc_addr;
        lh_next <= (SLOT_W+1)'(1);
      end else if (content_hit) begin
        lh_next <= (SLOT_W+1)'(match_slot) + 1'b1;
      end else begin
        lh_flag <= 1'b0;
      end
    end
  end

  a_one_outcome: assert property (@(posedge clk) disable iff (rst)
    acc_valid |-> $onehot({first_tag_hit, content_hit, comp_miss, conf_miss}));

endmodule
