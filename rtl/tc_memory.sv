// tc_memory: the trace cache memory, a direct-mapped array of LINES lines.
//
// Each line has a trace-information part and a trace-instruction part:
//   valid       line holds a trace
//   tag1        word address (bits 31..2) of the first instruction
//   tag2        word address of the instruction after the conditional
//               branch, or a copy of tag1 when there is none
//   size_m1     number of instructions in the trace minus one
//   br_exist    the trace holds a conditional branch
//   br_pos      slot of that branch
//   instr[]     SLOTS instruction words
//
// Ports: one write port (from tc_transfer) and three asynchronous read
// ports: "lk" for the hit logic's lookup of the fetch address, "hl" for the
// line the hit logic is currently following, and "sel" for the transfer
// unit's replacement test. Reads show the contents before the write of the
// same cycle. Synchronous active-high reset clears every valid bit; the
// other fields are not reset, since nothing reads them while invalid.
//
// The fields and their order follow the design (line widths of 4 or 8
// instructions, 4 to 512 lines). Keeping the whole word address in tag1 and
// tag2, including the index bits, also follows it. Flip-flop storage with
// asynchronous reads is this implementation's choice.
module tc_memory
  import tc_pkg::*;
#(
  parameter int unsigned LINES = 4,
  parameter int unsigned SLOTS = 4,
  localparam int unsigned IDX_W  = (LINES > 1) ? $clog2(LINES) : 1,
  localparam int unsigned SLOT_W = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic              clk,
  input  logic              rst,
  // write port
  input  logic              wr_en,
  input  logic [IDX_W-1:0]  wr_idx,
  input  waddr_t            wr_tag1,
  input  waddr_t            wr_tag2,
  input  logic [SLOT_W-1:0] wr_size_m1,
  input  logic              wr_br_exist,
  input  logic [SLOT_W-1:0] wr_br_pos,
  input  word_t             wr_instr [SLOTS],
  // lookup read port
  input  logic [IDX_W-1:0]  lk_idx,
  output logic              lk_valid,
  output waddr_t            lk_tag1,
  output word_t             lk_instr [SLOTS],
  // followed-line read port
  input  logic [IDX_W-1:0]  hl_idx,
  output logic              hl_valid,
  output waddr_t            hl_tag1,
  output waddr_t            hl_tag2,
  output logic [SLOT_W-1:0] hl_size_m1,
  output logic              hl_br_exist,
  output logic [SLOT_W-1:0] hl_br_pos,
  output word_t             hl_instr [SLOTS],
  // replacement-test read port
  input  logic [IDX_W-1:0]  sel_idx,
  output logic              sel_valid,
  output waddr_t            sel_tag1,
  output waddr_t            sel_tag2,
  output logic [SLOT_W-1:0] sel_size_m1
);

  logic [LINES-1:0]  valid;
  waddr_t            tag1    [LINES];
  waddr_t            tag2    [LINES];
  logic [SLOT_W-1:0] size_m1 [LINES];
  logic [LINES-1:0]  br_exist;
  logic [SLOT_W-1:0] br_pos  [LINES];
  word_t             instr   [LINES][SLOTS];

  always_ff @(posedge clk) begin
    if (rst) begin
      valid <= '0;
    end else if (wr_en) begin
      valid[wr_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      tag1[wr_idx]     <= wr_tag1;
      tag2[wr_idx]     <= wr_tag2;
      size_m1[wr_idx]  <= wr_size_m1;
      br_exist[wr_idx] <= wr_br_exist;
      br_pos[wr_idx]   <= wr_br_pos;
      instr[wr_idx]    <= wr_instr;
    end
  end

  always_comb begin
    lk_valid    = valid[lk_idx];
    lk_tag1     = tag1[lk_idx];
    lk_instr    = instr[lk_idx];
    hl_valid    = valid[hl_idx];
    hl_tag1     = tag1[hl_idx];
    hl_tag2     = tag2[hl_idx];
    hl_size_m1  = size_m1[hl_idx];
    hl_br_exist = br_exist[hl_idx];
    hl_br_pos   = br_pos[hl_idx];
    hl_instr    = instr[hl_idx];
    sel_valid   = valid[sel_idx];
    sel_tag1    = tag1[sel_idx];
    sel_tag2    = tag2[sel_idx];
    sel_size_m1 = size_m1[sel_idx];
  end

endmodule
