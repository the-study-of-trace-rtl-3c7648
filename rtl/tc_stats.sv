// tc_stats: measurement counters of the trace cache.
//
// The trace cache is judged by its hit rate, so the design counts, per
// fetch access: instruction-cache hits (for reference), first-tag hits,
// content hits, compulsory misses and conflict misses; and, per trace
// written: writes and overwrites. The same counts are also kept for each
// trace cache line, together with the longest trace ever written to the
// line. The sum of those longest traces over all lines (space_used) gives
// the space usage: space_used / (LINES*SLOTS).
//
// First-tag hits and misses are booked on the line indexed by the fetch
// address (acc_line); content hits on the line being followed (hit_line).
// Fill-buffer overflows and dropped rows are counted in total only.
//
// Per-line values are read through a select port (line_sel), combinational.
// All counters are W bits wide and wrap. Synchronous active-high reset
// clears them all.
//
// Which quantities are counted follows the design; the counter width, the
// running space_used sum and the select port are this implementation's
// choices.
module tc_stats #(
  parameter int unsigned LINES = 4,
  parameter int unsigned SLOTS = 4,
  parameter int unsigned W     = 32,
  localparam int unsigned IDX_W = (LINES > 1) ? $clog2(LINES) : 1,
  localparam int unsigned CNT_W = $clog2(SLOTS + 1),
  localparam int unsigned SUM_W = $clog2(LINES * SLOTS + 1)
) (
  input  logic             clk,
  input  logic             rst,
  // access outcome
  input  logic             acc_valid,
  input  logic             ic_hit,
  input  logic             first_tag_hit,
  input  logic             content_hit,
  input  logic             comp_miss,
  input  logic             conf_miss,
  input  logic [IDX_W-1:0] acc_line,
  input  logic [IDX_W-1:0] hit_line,
  // transfer outcome
  input  logic             ev_write,
  input  logic             ev_overwrite,
  input  logic [IDX_W-1:0] wr_line,
  input  logic [CNT_W-1:0] wr_size,
  input  logic             ev_drop,
  input  logic             ev_overflow,
  // totals
  output logic [W-1:0]     n_access,
  output logic [W-1:0]     n_ic_hit,
  output logic [W-1:0]     n_ftag_hit,
  output logic [W-1:0]     n_cont_hit,
  output logic [W-1:0]     n_comp_miss,
  output logic [W-1:0]     n_conf_miss,
  output logic [W-1:0]     n_write,
  output logic [W-1:0]     n_overwrite,
  output logic [W-1:0]     n_drop,
  output logic [W-1:0]     n_overflow,
  output logic [SUM_W-1:0] space_used,
  // per line
  input  logic [IDX_W-1:0] line_sel,
  output logic [W-1:0]     l_comp_miss,
  output logic [W-1:0]     l_conf_miss,
  output logic [W-1:0]     l_write,
  output logic [W-1:0]     l_overwrite,
  output logic [CNT_W-1:0] l_longest,
  output logic [W-1:0]     l_ftag_hit,
  output logic [W-1:0]     l_cont_hit
);

  logic [W-1:0]     pl_comp  [LINES];
  logic [W-1:0]     pl_conf  [LINES];
  logic [W-1:0]     pl_write [LINES];
  logic [W-1:0]     pl_owr   [LINES];
  logic [CNT_W-1:0] pl_long  [LINES];
  logic [W-1:0]     pl_ftag  [LINES];
  logic [W-1:0]     pl_cont  [LINES];

  logic longer;
  assign longer = ev_write && (wr_size > pl_long[wr_line]);

  always_ff @(posedge clk) begin
    if (rst) begin
      n_access    <= '0;
      n_ic_hit    <= '0;
      n_ftag_hit  <= '0;
      n_cont_hit  <= '0;
      n_comp_miss <= '0;
      n_conf_miss <= '0;
      n_write     <= '0;
      n_overwrite <= '0;
      n_drop      <= '0;
      n_overflow  <= '0;
      space_used  <= '0;
      pl_comp     <= '{default: '0};
      pl_conf     <= '{default: '0};
      pl_write    <= '{default: '0};
      pl_owr      <= '{default: '0};
      pl_long     <= '{default: '0};
      pl_ftag     <= '{default: '0};
      pl_cont     <= '{default: '0};
    end else begin
      if (acc_valid) begin
        n_access <= n_access + 1'b1;
        if (ic_hit) n_ic_hit <= n_ic_hit + 1'b1;
        if (first_tag_hit) begin
          n_ftag_hit        <= n_ftag_hit + 1'b1;
          pl_ftag[acc_line] <= pl_ftag[acc_line] + 1'b1;
        end
        if (content_hit) begin
          n_cont_hit        <= n_cont_hit + 1'b1;
          pl_cont[hit_line] <= pl_cont[hit_line] + 1'b1;
        end
        if (comp_miss) begin
          n_comp_miss       <= n_comp_miss + 1'b1;
          pl_comp[acc_line] <= pl_comp[acc_line] + 1'b1;
        end
        if (conf_miss) begin
          n_conf_miss       <= n_conf_miss + 1'b1;
          pl_conf[acc_line] <= pl_conf[acc_line] + 1'b1;
        end
      end
      if (ev_write) begin
        n_write           <= n_write + 1'b1;
        pl_write[wr_line] <= pl_write[wr_line] + 1'b1;
      end
      if (ev_overwrite) begin
        n_overwrite     <= n_overwrite + 1'b1;
        pl_owr[wr_line] <= pl_owr[wr_line] + 1'b1;
      end
      if (longer) begin
        pl_long[wr_line] <= wr_size;
        space_used       <= space_used + SUM_W'(wr_size) - SUM_W'(pl_long[wr_line]);
      end
      if (ev_drop)     n_drop     <= n_drop + 1'b1;
      if (ev_overflow) n_overflow <= n_overflow + 1'b1;
    end
  end

  always_comb begin
    l_comp_miss = pl_comp[line_sel];
    l_conf_miss = pl_conf[line_sel];
    l_write     = pl_write[line_sel];
    l_overwrite = pl_owr[line_sel];
    l_longest   = pl_long[line_sel];
    l_ftag_hit  = pl_ftag[line_sel];
    l_cont_hit  = pl_cont[line_sel];
  end

endmodule
