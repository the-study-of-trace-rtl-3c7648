// tc_fill_buffer: fill buffer and fill logic.
//
// The buffer has ROWS rows of SLOTS instruction slots. Each slot keeps an
// instruction and its word address ("trace content"); each row keeps a ready
// flag, the trace size, a branch-existing flag and the branch position
// ("trace information"). One row at a time, the current row, is being
// filled; rows that are finished wait, ready, for the buffer-cache transfer.
//
// Fill policy. Up to two gathered instructions arrive per cycle (slot 0 is
// the older). They are placed one after the other at the current row/slot
// pointer, and the current trace is terminated:
//   rule 1  when an instruction fills the last slot of the row;
//   rule 2  right after a delimiter (jump, jr, jal, jalr, trap, rfe);
//   rule 3  when a conditional branch arrives while the row already holds
//           one: the row is closed without that branch, and the branch
//           starts the next row, even if slots were left.
// So a trace holds at most one conditional branch, i.e. two basic blocks.
// With two arrivals, rule 1 gives the two cases of the design: the first
// instruction fills the row and the second starts the next row, or both fit
// exactly and the next row starts empty. At most two rows close per cycle.
//
// Draining. Rows close in ring order. The oldest ready row (rd_row) is
// presented on the rd_* outputs; the transfer unit always consumes it in
// the same cycle, so it is cleared at the next clock edge. The trace cache
// is passive and cannot stall the fetch stage, so if the fill pointer moves
// into a row that is still waiting (more than ROWS-1 rows closed faster
// than one per cycle), that waiting trace is dropped and `overflow` pulses.
//
// Timing: arrivals in cycle n are in the buffer after edge n; a row closed
// at edge n is presented in cycle n+1 at the earliest. Synchronous
// active-high reset empties the buffer.
//
// Row count (4), the information fields and the three rules follow the
// design. The drop-on-overflow rule, draining one row per cycle in closing
// order and the trace-size counter being one bit wider than the branch
// position (it counts 0..SLOTS) are this implementation's choices.
module tc_fill_buffer
  import tc_pkg::*;
#(
  parameter int unsigned ROWS  = 4,
  parameter int unsigned SLOTS = 4,
  localparam int unsigned ROW_W  = (ROWS  > 1) ? $clog2(ROWS)  : 1,
  localparam int unsigned SLOT_W = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned CNT_W  = $clog2(SLOTS + 1)
) (
  input  logic              clk,
  input  logic              rst,
  // gathered instructions (tc_gather), program order
  input  logic [1:0]        g_valid,
  input  word_t             g_instr  [2],
  input  waddr_t            g_addr   [2],
  input  logic [1:0]        g_branch,
  input  logic [1:0]        g_delim,
  // oldest ready row, consumed in the cycle it is presented
  output logic              rd_valid,
  output logic [CNT_W-1:0]  rd_size,
  output logic              rd_br_exist,
  output logic [SLOT_W-1:0] rd_br_pos,
  output word_t             rd_instr [SLOTS],
  output waddr_t            rd_addr  [SLOTS],
  // events of this cycle
  output logic [1:0]        ev_rule1,     // rows closed because full
  output logic [1:0]        ev_rule2,     // rows closed by a delimiter
  output logic [1:0]        ev_rule3,     // rows closed by a second branch
  output logic              overflow      // a waiting trace was dropped
);

  // ---------------------------------------------------------------- state
  logic [ROW_W-1:0]  cur_row;
  logic [CNT_W-1:0]  cur_slot;   // = size of the current row
  logic              cur_br;
  logic [SLOT_W-1:0] cur_brpos;
  logic [ROW_W-1:0]  rd_row;

  logic [ROWS-1:0]   row_ready;
  logic [CNT_W-1:0]  row_size  [ROWS];
  logic [ROWS-1:0]   row_br;
  logic [SLOT_W-1:0] row_brpos [ROWS];
  word_t             buf_instr [ROWS][SLOTS];
  waddr_t            buf_addr  [ROWS][SLOTS];

  // ------------------------------------------------------- placement logic
  typedef struct packed {
    logic              en;
    logic [ROW_W-1:0]  row;
    logic [CNT_W-1:0]  size;
    logic              br;
    logic [SLOT_W-1:0] brpos;
  } term_t;

  logic [ROW_W-1:0]  n_row;
  logic [CNT_W-1:0]  n_slot;
  logic              n_br;
  logic [SLOT_W-1:0] n_brpos;
  logic [ROW_W-1:0]  n_rd;
  logic              drain;
  term_t             term  [2];
  logic [1:0]        wr_en;
  logic [ROW_W-1:0]  wr_row  [2];
  logic [SLOT_W-1:0] wr_slot [2];
  logic [ROWS-1:0]   drop;

  function automatic logic [ROW_W-1:0] row_inc(logic [ROW_W-1:0] r);
    return (r == ROW_W'(ROWS - 1)) ? '0 : r + 1'b1;
  endfunction

  always_comb begin
    int nt;
    n_row   = cur_row;
    n_slot  = cur_slot;
    n_br    = cur_br;
    n_brpos = cur_brpos;
    drain   = row_ready[rd_row];
    n_rd    = drain ? row_inc(rd_row) : rd_row;
    term    = '{default: '0};
    wr_en   = '0;
    wr_row  = '{default: '0};
    wr_slot = '{default: '0};
    drop    = '0;
    ev_rule1 = '0;
    ev_rule2 = '0;
    ev_rule3 = '0;
    nt = 0;
    for (int k = 0; k < 2; k++) begin
      if (g_valid[k]) begin
        // rule 3: second conditional branch starts a new row
        if (g_branch[k] && n_br) begin
          term[nt] = '{en: 1'b1, row: n_row, size: n_slot, br: n_br, brpos: n_brpos};
          ev_rule3[nt] = 1'b1;
          nt = nt + 1;
          n_row = row_inc(n_row);
          n_slot = '0; n_br = 1'b0; n_brpos = '0;
          if (row_ready[n_row] && !(drain && n_row == rd_row)) begin
            drop[n_row] = 1'b1;
            if (n_rd == n_row) n_rd = row_inc(n_row);
          end
        end
        wr_en[k]   = 1'b1;
        wr_row[k]  = n_row;
        wr_slot[k] = SLOT_W'(n_slot);
        if (g_branch[k]) begin
          n_br    = 1'b1;
          n_brpos = SLOT_W'(n_slot);
        end
        n_slot = n_slot + 1'b1;
        // rule 1 (row full) and rule 2 (delimiter)
        if (n_slot == CNT_W'(SLOTS) || g_delim[k]) begin
          term[nt] = '{en: 1'b1, row: n_row, size: n_slot, br: n_br, brpos: n_brpos};
          if (g_delim[k]) ev_rule2[nt] = 1'b1;
          else            ev_rule1[nt] = 1'b1;
          nt = nt + 1;
          n_row = row_inc(n_row);
          n_slot = '0; n_br = 1'b0; n_brpos = '0;
          if (row_ready[n_row] && !(drain && n_row == rd_row)) begin
            drop[n_row] = 1'b1;
            if (n_rd == n_row) n_rd = row_inc(n_row);
          end
        end
      end
    end
    overflow = |drop;
  end

  // ------------------------------------------------------------ registers
  always_ff @(posedge clk) begin
    if (rst) begin
      cur_row   <= '0;
      cur_slot  <= '0;
      cur_br    <= 1'b0;
      cur_brpos <= '0;
      rd_row    <= '0;
      row_ready <= '0;
      row_br    <= '0;
      row_size  <= '{default: '0};
      row_brpos <= '{default: '0};
      buf_instr <= '{default: '0};
      buf_addr  <= '{default: '0};
    end else begin
      cur_row   <= n_row;
      cur_slot  <= n_slot;
      cur_br    <= n_br;
      cur_brpos <= n_brpos;
      rd_row    <= n_rd;
      // transferred or dropped rows are emptied
      for (int r = 0; r < ROWS; r++) begin
        if ((drain && ROW_W'(r) == rd_row) || drop[r]) begin
          row_ready[r] <= 1'b0;
          row_size[r]  <= '0;
          row_br[r]    <= 1'b0;
          row_brpos[r] <= '0;
        end
      end
      // closed rows become ready
      for (int t = 0; t < 2; t++) begin
        if (term[t].en) begin
          row_ready[term[t].row] <= 1'b1;
          row_size[term[t].row]  <= term[t].size;
          row_br[term[t].row]    <= term[t].br;
          row_brpos[term[t].row] <= term[t].brpos;
        end
      end
      for (int k = 0; k < 2; k++) begin
        if (wr_en[k]) begin
          buf_instr[wr_row[k]][wr_slot[k]] <= g_instr[k];
          buf_addr[wr_row[k]][wr_slot[k]]  <= g_addr[k];
        end
      end
    end
  end

  // --------------------------------------------------------------- output
  assign rd_valid    = row_ready[rd_row];
  assign rd_size     = row_size[rd_row];
  assign rd_br_exist = row_br[rd_row];
  assign rd_br_pos   = row_brpos[rd_row];
  always_comb begin
    for (int s = 0; s < SLOTS; s++) begin
      rd_instr[s] = buf_instr[rd_row][s];
      rd_addr[s]  = buf_addr[rd_row][s];
    end
  end

  // a closed row always holds at least one instruction
  a_term_nonempty: assert property (@(posedge clk) disable iff (rst)
    term[0].en |-> term[0].size != '0);

endmodule
