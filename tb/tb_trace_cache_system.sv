// tb_trace_cache_system: end-to-end test of the trace cache.
//
// A behavioural fetch/dispatch model walks a small synthetic DLX program
// (built from a hash of the address: plain instructions, conditional
// branches with a biased direction, jumps) and presents two instructions
// per cycle in stage registers A and B. The dispatcher model accepts two,
// one or none of them. Whenever the fetch stage is loaded with a new head
// instruction, the program-counter load (an access) is signalled with that
// address. A region of back-to-back jumps makes two traces close per cycle
// so that the fill buffer overflows. A tiny direct-mapped instruction cache
// model supplies the reference ic_hit flag.
//
// Every access outcome is compared with tc_ref_pkg's model, and so are the
// final counters. Each mechanism (fill rules 1-3, both two-instruction
// cases of rule 1, writes, overwrites, drops, overflow, first-tag and
// content hits, both miss kinds) must occur at least once.
//
// Default parameters (4-instruction lines, 4 lines, 4 fill rows). Cycle
// count: NCYC.
module tb_trace_cache_system;
  import tc_ref_pkg::*;

  localparam int SLOTS = 4;
  localparam int LINES = 4;
  localparam int ROWS  = 4;
  localparam int NCYC  = 20000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic   a_valid, b_valid, a_dispatch, b_dispatch, pc_write, ic_hit;
  word_t  a_instr, b_instr;
  waddr_t a_addr, b_addr, pc;
  logic   first_tag_hit, content_hit, comp_miss, conf_miss;
  logic [1:0] hit_line, hit_slot, hit_count;
  word_t  hit_instr [2];
  logic [31:0] n_access, n_ic_hit, n_ftag_hit, n_cont_hit, n_comp_miss,
               n_conf_miss, n_write, n_overwrite, n_drop, n_overflow;
  logic [4:0]  space_used;
  logic [1:0]  line_sel;
  logic [31:0] l_comp_miss, l_conf_miss, l_write, l_overwrite, l_ftag_hit, l_cont_hit;
  logic [2:0]  l_longest;
  logic [1:0]  ev_rule1, ev_rule2, ev_rule3;

  trace_cache_system dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ------------------------------------------------ synthetic program
  function automatic int unsigned hash(int unsigned x);
    x = x ^ (x >> 7); x = x * 32'h9E3779B1; x = x ^ (x >> 13);
    return x;
  endfunction

  localparam int unsigned CODE = 96;     // main code region, words
  localparam int unsigned STORM = 200;   // start of the jump chain
  localparam int unsigned STORM_N = 24;

  function automatic word_t instr_at(int unsigned a);
    int unsigned h = hash(a + 12345);
    if (a >= STORM) return {6'h02, 26'(a)};                 // J
    if (h % 100 < 12) return {6'h04 + 6'(h[8]), 26'(a)};    // BEQZ / BNEZ
    if (h % 100 < 17) return {6'h02, 26'(a)};               // J
    if (h % 100 < 19) return {6'h12, 26'(a)};               // JR
    return {6'h08, 26'(h)};                                 // ADDI (plain)
  endfunction

  // next address after executing the instruction at a
  function automatic int unsigned next_addr(int unsigned a);
    word_t i = instr_at(a);
    int unsigned h = hash(a * 7 + 3);
    int c = op_class(i);
    if (a >= STORM) return (a + 2 < STORM + STORM_N) ? a + 2 : 4;
    if (c == 1) begin
      bit taken = (h % 100 < 75) ^ ($urandom_range(0, 99) < 10);
      return taken ? (h >> 8) % CODE : a + 1;
    end
    if (c == 2) begin
      if ($urandom_range(0, 99) < 5) return STORM;
      return (i[31:26] == 6'h12 && $urandom_range(0, 1) == 1) ? 0 : (h >> 8) % CODE;
    end
    return (a + 1 < CODE) ? a + 1 : 0;
  endfunction

  // dynamic instruction stream
  int unsigned stream[$];
  int unsigned walk_pc = 0;
  function automatic void refill();
    while (stream.size() < 4) begin
      stream.push_back(walk_pc);
      walk_pc = next_addr(walk_pc);
    end
  endfunction

  // tiny instruction cache model: 8 lines of 2 words, direct mapped
  bit          icv [8];
  int unsigned ict [8];
  function automatic bit ic_access(int unsigned a);
    int unsigned idx = (a >> 1) % 8, tg = a >> 4;
    bit h = icv[idx] && ict[idx] == tg;
    icv[idx] = 1; ict[idx] = tg;
    return h;
  endfunction

  // ------------------------------------------------ main loop
  tc_model m;
  int nd, cyc;
  int gn;
  word_t  gi [2];
  waddr_t ga [2];
  int c_ftag, c_cont, c_comp, c_conf, c_only_a, c_icm;
  bit new_head;

  initial begin
    m = new(ROWS, SLOTS, LINES);
    a_valid = 0; b_valid = 0; a_dispatch = 0; b_dispatch = 0;
    pc_write = 0; ic_hit = 0; a_instr = 0; b_instr = 0; a_addr = 0; b_addr = 0;
    pc = 0; line_sel = 0;
    gn = 0; gi = '{default: '0}; ga = '{default: '0};
    refill();
    new_head = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (cyc = 0; cyc < NCYC; cyc++) begin
      // drive this cycle
      automatic int unsigned h0, h1;
      automatic outcome_e exp_o;
      automatic int exp_slot;
      refill();
      h0 = stream[0]; h1 = stream[1];
      a_valid = 1; a_instr = instr_at(h0); a_addr = waddr_t'(h0);
      b_valid = 1; b_instr = instr_at(h1); b_addr = waddr_t'(h1);
      if (h0 >= STORM) nd = 2;
      else begin
        automatic int r = $urandom_range(0, 99);
        nd = (r < 60) ? 2 : (r < 85) ? 1 : 0;
      end
      a_dispatch = (nd >= 1);
      b_dispatch = (nd == 2);
      pc_write = new_head;
      pc = waddr_t'(h0);
      ic_hit = new_head ? ic_access(h0) : 1'b0;
      #1;
      // expected access outcome
      if (new_head) begin
        exp_o = m.access(waddr_t'(h0), exp_slot);
        check(first_tag_hit == (exp_o == O_FTAG), "first_tag_hit");
        check(content_hit == (exp_o == O_CONT), "content_hit");
        check(comp_miss == (exp_o == O_COMP), "comp_miss");
        check(conf_miss == (exp_o == O_CONF), "conf_miss");
        if (exp_o == O_CONT) check(int'(hit_slot) == exp_slot, "hit_slot");
        if (exp_o == O_FTAG || exp_o == O_CONT)
          check(hit_instr[0] == instr_at(h0), "hit_instr[0]");
        if ((exp_o == O_FTAG || exp_o == O_CONT) && hit_count == 2) begin
          automatic word_t e1 = m.slot_instr(int'(hit_line), int'(hit_slot) + 1);
          check(hit_instr[1] == e1, "hit_instr[1]");
        end
        if (exp_o == O_FTAG) c_ftag++;
        if (exp_o == O_CONT) c_cont++;
        if (exp_o == O_COMP) c_comp++;
        if (exp_o == O_CONF) c_conf++;
        if (!ic_hit) c_icm++;
        m.access_update(waddr_t'(h0), exp_o, exp_slot);
      end else begin
        check(!first_tag_hit && !content_hit && !comp_miss && !conf_miss, "idle access");
      end
      if (nd == 1) c_only_a++;
      // model: transfer, then fill with what was gathered last cycle
      m.transfer();
      m.fill(gn, gi, ga);
      gn = nd;
      gi[0] = a_instr; ga[0] = a_addr; gi[1] = b_instr; ga[1] = b_addr;
      @(posedge clk);
      #1;
      new_head = (nd > 0);
      for (int k = 0; k < nd; k++) void'(stream.pop_front());
    end
    check(d_rule1 == m.n_rule1, "rule 1 events");
    check(d_rule2 == m.n_rule2, "rule 2 events");
    check(d_rule3 == m.n_rule3, "rule 3 events");
    a_dispatch = 0; b_dispatch = 0; pc_write = 0;
    @(posedge clk); #1;

    // final counters (the last model fill has not happened in the DUT's
    // transfer yet, so compare only access counters and write counters
    // that the model has already seen)
    check(n_ftag_hit == 32'(c_ftag), "n_ftag_hit");
    check(n_cont_hit == 32'(c_cont), "n_cont_hit");
    check(n_comp_miss == 32'(c_comp), "n_comp_miss");
    check(n_conf_miss == 32'(c_conf), "n_conf_miss");
    check(n_access == 32'(c_ftag + c_cont + c_comp + c_conf), "n_access");
    check(n_access - n_ic_hit == 32'(c_icm), "n_ic_hit");
    check(n_overflow == 32'(m.n_overflow), "n_overflow");
    $display("accesses=%0d ftag=%0d cont=%0d comp=%0d conf=%0d ic_hit=%0d",
             n_access, n_ftag_hit, n_cont_hit, n_comp_miss, n_conf_miss, n_ic_hit);
    $display("writes=%0d/%0d overwrites=%0d/%0d drops=%0d/%0d overflow=%0d space=%0d/%0d",
             n_write, m.n_write, n_overwrite, m.n_overwrite, n_drop, m.n_drop,
             n_overflow, space_used, LINES * SLOTS);
    $display("rules: 1=%0d 2=%0d 3=%0d case1=%0d case2=%0d only_a=%0d",
             m.n_rule1, m.n_rule2, m.n_rule3, m.n_case1, m.n_case2, c_only_a);
    // the DUT has run one transfer more than the model: the
    // extra cycle after the loop
    check(int'(n_write) - m.n_write inside {0, 1}, "n_write");
    check(int'(n_overwrite) - m.n_overwrite inside {0, 1}, "n_overwrite");
    check(int'(n_drop) - m.n_drop inside {0, 1}, "n_drop");
    // per-line sums
    begin
      automatic int sw = 0, sc = 0, sf = 0, sn = 0, sl = 0;
      for (int l = 0; l < LINES; l++) begin
        line_sel = 2'(l); #1;
        sw += int'(l_write); sc += int'(l_comp_miss) + int'(l_conf_miss);
        sf += int'(l_ftag_hit); sn += int'(l_cont_hit); sl += int'(l_longest);
      end
      check(sw == int'(n_write), "per-line writes");
      check(sc == int'(n_comp_miss + n_conf_miss), "per-line misses");
      check(sf == int'(n_ftag_hit) && sn == int'(n_cont_hit), "per-line hits");
      check(sl == int'(space_used), "space_used");
    end
    // every mechanism must have happened
    check(m.n_rule1 > 0, "rule 1 seen");
    check(m.n_rule2 > 0, "rule 2 seen");
    check(m.n_rule3 > 0, "rule 3 seen");
    check(m.n_case1 > 0, "rule 1 case 1 seen");
    check(m.n_case2 > 0, "rule 1 case 2 seen");
    check(c_only_a > 0, "single dispatch seen");
    check(n_write > 0 && n_overwrite > 0 && n_drop > 0, "write/overwrite/drop seen");
    check(n_overflow > 0, "overflow seen");
    check(c_ftag > 0 && c_cont > 0 && c_comp > 0 && c_conf > 0, "hit/miss kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fill-rule events of the DUT, compared with the model after the loop
  int d_rule1 = 0, d_rule2 = 0, d_rule3 = 0;
  always @(posedge clk) if (!rst) begin
    d_rule1 += $countones(ev_rule1);
    d_rule2 += $countones(ev_rule2);
    d_rule3 += $countones(ev_rule3);
  end

  initial begin
    #(10 * (NCYC + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
