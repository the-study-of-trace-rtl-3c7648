// tc_workload_lane: one trace cache configuration under a shared fetch
// stream, checked against its own copy of the reference model.
//
// The testbench that instantiates several lanes drives the fetch-stage
// inputs shortly after each rising edge. At the falling edge each lane
// compares the access outcome with its model (tc_ref_pkg), then advances
// the model by one cycle: transfer, then fill with the instructions that
// were dispatched in the previous cycle. While rst is high the model is
// rebuilt, so each workload starts from an empty trace cache.
//
// report() compares the final counters of the trace cache with the model,
// prints the hit and miss rates and the space usage of this configuration,
// and clears the lane's outcome counts.
module tc_workload_lane
  import tc_ref_pkg::*;
#(
  parameter int SLOTS = 4,
  parameter int LINES = 4,
  parameter int ROWS  = 4
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   a_valid,
  input  word_t  a_instr,
  input  waddr_t a_addr,
  input  logic   b_valid,
  input  word_t  b_instr,
  input  waddr_t b_addr,
  input  logic   a_dispatch,
  input  logic   b_dispatch,
  input  logic   pc_write,
  input  waddr_t pc,
  input  logic   ic_hit,
  output int     checks,
  output int     failures
);
  localparam int IDX_W = $clog2(LINES), SLOT_W = $clog2(SLOTS), CNT_W = $clog2(SLOTS + 1);

  logic first_tag_hit, content_hit, comp_miss, conf_miss;
  logic [IDX_W-1:0]  hit_line, line_sel;
  logic [SLOT_W-1:0] hit_slot;
  logic [1:0]        hit_count;
  word_t             hit_instr [2];
  logic [31:0] n_access, n_ic_hit, n_ftag_hit, n_cont_hit, n_comp_miss,
               n_conf_miss, n_write, n_overwrite, n_drop, n_overflow;
  logic [$clog2(LINES * SLOTS + 1)-1:0] space_used;
  logic [31:0] l_comp_miss, l_conf_miss, l_write, l_overwrite, l_ftag_hit, l_cont_hit;
  logic [CNT_W-1:0] l_longest;
  logic [1:0] ev_rule1, ev_rule2, ev_rule3;

  trace_cache_system #(.SLOTS(SLOTS), .LINES(LINES), .ROWS(ROWS)) dut (.*);

  assign line_sel = '0;

  initial begin checks = 0; failures = 0; end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [%0d/%0d] %s at %0t", SLOTS, LINES, what, $time);
    end
  endfunction

  tc_model m = new(ROWS, SLOTS, LINES);
  int gn = 0;
  word_t  gi [2] = '{default: '0};
  waddr_t ga [2] = '{default: '0};
  int c_ftag = 0, c_cont = 0, c_comp = 0, c_conf = 0;

  always @(negedge clk) begin
    if (rst) begin
      m = new(ROWS, SLOTS, LINES);
      gn = 0;
      c_ftag = 0; c_cont = 0; c_comp = 0; c_conf = 0;
    end else begin
      if (pc_write) begin
        automatic int s;
        automatic outcome_e o = m.access(pc, s);
        check(first_tag_hit == (o == O_FTAG) && content_hit == (o == O_CONT) &&
              comp_miss == (o == O_COMP) && conf_miss == (o == O_CONF), "access outcome");
        if (o == O_CONT) check(int'(hit_slot) == s, "hit slot");
        if (o == O_FTAG || o == O_CONT)
          check(hit_instr[0] == m.slot_instr(int'(hit_line), int'(hit_slot)), "supplied instruction");
        c_ftag += int'(o == O_FTAG); c_cont += int'(o == O_CONT);
        c_comp += int'(o == O_COMP); c_conf += int'(o == O_CONF);
        m.access_update(pc, o, s);
      end else begin
        check(!first_tag_hit && !content_hit && !comp_miss && !conf_miss, "idle access");
      end
      m.transfer();
      m.fill(gn, gi, ga);
      gn = int'(a_dispatch && a_valid) + int'(b_dispatch && b_valid);
      gi[0] = a_instr; ga[0] = a_addr; gi[1] = b_instr; ga[1] = b_addr;
    end
  end

  // called once the fetch stream has stopped for at least two cycles
  task automatic report(string name);
    automatic int acc = c_ftag + c_cont + c_comp + c_conf;
    check(n_access == 32'(acc), "n_access");
    check(n_ftag_hit == 32'(c_ftag) && n_cont_hit == 32'(c_cont), "hit counters");
    check(n_comp_miss == 32'(c_comp) && n_conf_miss == 32'(c_conf), "miss counters");
    check(int'(n_write) == m.n_write && int'(n_overwrite) == m.n_overwrite, "write counters");
    check(int'(n_overflow) == m.n_overflow, "overflow counter");
    $display("%-8s TC_%0d %3dL  acc %5d  hit %5.1f%% (ftag %5.1f cont %5.1f)  ic hit %5.1f%%  miss comp %5.1f conf %5.1f  writes %4d overwrites %4d  space %5.1f%%",
             name, SLOTS, LINES, acc,
             100.0 * (c_ftag + c_cont) / acc, 100.0 * c_ftag / acc, 100.0 * c_cont / acc,
             100.0 * n_ic_hit / acc, 100.0 * c_comp / acc, 100.0 * c_conf / acc,
             n_write, n_overwrite, 100.0 * space_used / (SLOTS * LINES));
  endtask
endmodule
