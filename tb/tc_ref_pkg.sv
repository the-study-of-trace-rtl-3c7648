// tc_ref_pkg: cycle-level reference model of the trace cache, for the
// testbenches. It is written independently of the RTL: traces are queues of
// (instruction, address) pairs, the fill buffer is a queue of finished
// traces, and each trace cache line keeps the real address of every slot,
// so the hit check does not rebuild addresses from tags as the RTL does.
//
// Model cycle, matching the RTL timing:
//   access()   outcome of a fetch access against the current contents
//   transfer() decide about the oldest finished trace (write or drop)
//   fill()     drop the transferred trace from the queue, then place the
//              instructions gathered in the previous cycle
package tc_ref_pkg;

  typedef logic [31:0] word_t;
  typedef logic [29:0] waddr_t;

  // opcode classes: 0 plain, 1 conditional branch, 2 delimiter
  function automatic int op_class(word_t instr);
    case (instr[31:26])
      6'h04, 6'h05:                       return 1;
      6'h02, 6'h03, 6'h10, 6'h11, 6'h12, 6'h13: return 2;
      default:                            return 0;
    endcase
  endfunction

  class trace_c;
    word_t  instr[$];
    waddr_t addr[$];
    int     br_pos = -1;   // -1: no conditional branch
  endclass

  typedef enum int {O_NONE, O_FTAG, O_CONT, O_COMP, O_CONF} outcome_e;

  class tc_model;
    int rows, slots, lines;
    // fill buffer
    trace_c cur;
    trace_c q[$];
    // event counts
    int n_rule1, n_rule2, n_rule3, n_overflow;
    int n_write, n_overwrite, n_drop;
    int n_case1, n_case2;
    // trace cache lines
    bit     valid[];
    trace_c line[];
    // hit state
    bit     lh_flag;
    int     lh_line;
    waddr_t lh_first;
    int     lh_next;

    function new(int rows, int slots, int lines);
      this.rows = rows; this.slots = slots; this.lines = lines;
      cur = new();
      valid = new[lines];
      line = new[lines];
      foreach (line[i]) line[i] = new();
      lh_flag = 0;
    endfunction

    function void close_cur(int rule);
      q.push_back(cur);
      cur = new();
      if (rule == 1) n_rule1++;
      if (rule == 2) n_rule2++;
      if (rule == 3) n_rule3++;
    endfunction

    // oldest finished trace, or null
    function trace_c front();
      return (q.size() > 0) ? q[0] : null;
    endfunction

    // transfer decision for the oldest finished trace
    function void transfer();
      trace_c t;
      int idx;
      if (q.size() == 0) return;
      t = q[0];
      if (t.instr.size() < 2) begin n_drop++; return; end
      idx = int'(t.addr[0]) % lines;
      if (valid[idx] && line[idx].addr[0] == t.addr[0] &&
          t.instr.size() < line[idx].instr.size()) begin
        n_drop++;
        return;
      end
      if (valid[idx]) begin
        bit same = (line[idx].addr[0] == t.addr[0]) &&
                   (line[idx].instr.size() == t.instr.size()) &&
                   (tag2(line[idx]) == tag2(t));
        if (!same) n_overwrite++;
      end
      n_write++;
      valid[idx] = 1;
      line[idx] = t;
    endfunction

    static function waddr_t tag2(trace_c t);
      if (t.br_pos >= 0 && t.br_pos < t.instr.size() - 1) return t.addr[t.br_pos + 1];
      return t.addr[0];
    endfunction

    // place the gathered instructions (n = 0, 1 or 2), after dropping the
    // trace the transfer unit consumed in this cycle
    function void fill(int n, word_t ins[2], waddr_t adr[2]);
      int closed_before;
      if (q.size() > 0) void'(q.pop_front());
      closed_before = q.size();
      for (int k = 0; k < n; k++) begin
        int c = op_class(ins[k]);
        if (c == 1 && cur.br_pos >= 0) begin
          close_cur(3);
          check_overflow();
        end
        if (c == 1) cur.br_pos = cur.instr.size();
        cur.instr.push_back(ins[k]);
        cur.addr.push_back(adr[k]);
        if (cur.instr.size() == slots) begin
          if (n == 2 && k == 0) n_case1++;
          if (n == 2 && k == 1 && cur.instr.size() >= 2 &&
              cur.addr[cur.instr.size()-2] == adr[0]) n_case2++;
          close_cur(c == 2 ? 2 : 1);
          check_overflow();
        end else if (c == 2) begin
          close_cur(2);
          check_overflow();
        end
      end
    endfunction

    function void check_overflow();
      if (q.size() >= rows) begin
        void'(q.pop_front());
        n_overflow++;
      end
    endfunction

    function word_t slot_instr(int l, int s);
      trace_c t = line[l];
      return (s < t.instr.size()) ? t.instr[s] : '0;
    endfunction

    // outcome of a fetch access at word address pc
    function outcome_e access(waddr_t pc, output int slot);
      int idx = int'(pc) % lines;
      slot = 0;
      if (valid[idx] && line[idx].addr[0] == pc) return O_FTAG;
      if (lh_flag && valid[lh_line] && line[lh_line].addr[0] == lh_first) begin
        for (int j = lh_next; j < line[lh_line].addr.size(); j++)
          if (line[lh_line].addr[j] == pc) begin slot = j; return O_CONT; end
      end
      return valid[idx] ? O_CONF : O_COMP;
    endfunction

    function void access_update(waddr_t pc, outcome_e o, int slot);
      if (o == O_FTAG) begin
        lh_flag = 1; lh_line = int'(pc) % lines; lh_first = pc; lh_next = 1;
      end else if (o == O_CONT) begin
        lh_next = slot + 1;
      end else begin
        lh_flag = 0;
      end
    endfunction
  endclass

endpackage
