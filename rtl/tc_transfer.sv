// tc_transfer: buffer-cache transfer unit.
//
// Every cycle it looks at the oldest ready fill-buffer row and decides
// whether that trace is written into the trace cache memory or dropped.
//
// Line selection: the trace cache is direct mapped. The line index is the
// low IDX_W bits of the word address of the first instruction of the trace,
// i.e. byte-address bits 2 .. 2+IDX_W-1.
//
// Write condition (all must hold):
//   * the trace holds more than one instruction (single-instruction traces
//     are not worth a line);
//   * the selected line is empty, or holds a trace that starts at a
//     different address, or holds a trace that is not longer than the new
//     one (new size >= stored size).
// Otherwise the row is dropped. Either way the fill buffer frees the row.
//
// What is written: valid=1; Tag_1 = word address (bits 31..2) of the first
// instruction; Tag_2 = word address of the instruction that follows the
// conditional branch inside the trace, or a copy of Tag_1 when the trace
// has no branch or the branch is its last instruction; the trace size
// (stored as size-1, so it fits in log2(SLOTS) bits), the branch-existing
// flag and branch position; and the instructions themselves (their
// addresses are not kept).
//
// Events: ev_write for every write; ev_overwrite when the write replaces a
// valid line whose first address, size or Tag_2 differ; ev_drop_short and
// ev_drop_keep for the two ways a row is dropped.
//
// Timing: combinational; the write happens at the clock edge that ends the
// cycle, in tc_memory.
//
// Line selection from bit 2, the single-instruction filter, the contents
// and the Tag_2 rule follow the design. The replacement test follows the
// behaviour the design's results show (full-size traces do replace each
// other); a plain "longer than the stored trace" test would never let a
// full line be replaced.
module tc_transfer
  import tc_pkg::*;
#(
  parameter int unsigned LINES = 4,
  parameter int unsigned SLOTS = 4,
  localparam int unsigned IDX_W  = (LINES > 1) ? $clog2(LINES) : 1,
  localparam int unsigned SLOT_W = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned CNT_W  = $clog2(SLOTS + 1)
) (
  // ready row from the fill buffer
  input  logic              rd_valid,
  input  logic [CNT_W-1:0]  rd_size,
  input  logic              rd_br_exist,
  input  logic [SLOT_W-1:0] rd_br_pos,
  input  waddr_t            rd_addr [SLOTS],
  // trace information of the selected line
  output logic [IDX_W-1:0]  sel_idx,
  input  logic              line_valid,
  input  waddr_t            line_tag1,
  input  waddr_t            line_tag2,
  input  logic [SLOT_W-1:0] line_size_m1,
  // write command to the trace cache memory
  output logic              wr_en,
  output logic [IDX_W-1:0]  wr_idx,
  output waddr_t            wr_tag1,
  output waddr_t            wr_tag2,
  output logic [SLOT_W-1:0] wr_size_m1,
  output logic              wr_br_exist,
  output logic [SLOT_W-1:0] wr_br_pos,
  // events
  output logic              ev_write,
  output logic              ev_overwrite,
  output logic              ev_drop_short,
  output logic              ev_drop_keep
);

  logic [CNT_W:0] line_size;
  logic           long_enough, replace_ok, br_inside;

  always_comb begin
    sel_idx     = IDX_W'(rd_addr[0]);
    line_size   = (CNT_W+1)'(line_size_m1) + 1'b1;
    long_enough = rd_size > CNT_W'(1);
    replace_ok  = !line_valid || (line_tag1 != rd_addr[0]) ||
                  ((CNT_W+1)'(rd_size) >= line_size);
    br_inside   = rd_br_exist && ((CNT_W+1)'(rd_br_pos) + 1'b1 < (CNT_W+1)'(rd_size));

    wr_en       = rd_valid && long_enough && replace_ok;
    wr_idx      = sel_idx;
    wr_tag1     = rd_addr[0];
    wr_tag2     = br_inside ? rd_addr[rd_br_pos + 1'b1] : rd_addr[0];
    wr_size_m1  = SLOT_W'(rd_size - 1'b1);
    wr_br_exist = rd_br_exist;
    wr_br_pos   = rd_br_pos;

    ev_write      = wr_en;
    ev_overwrite  = wr_en && line_valid &&
                    ((line_tag1 != wr_tag1) || (line_size_m1 != wr_size_m1) ||
                     (line_tag2 != wr_tag2));
    ev_drop_short = rd_valid && !long_enough;
    ev_drop_keep  = rd_valid && long_enough && !replace_ok;
  end

endmodule
