// tb_tc_hit_logic: the hit logic against a trace cache held in this
// testbench. Each stored trace keeps the real address of every slot, so the
// expected outcome (first-tag hit, content hit on slot j, compulsory or
// conflict miss) is found by searching those addresses, not by rebuilding
// them from tags. Accesses mostly walk a trace forwards by 1 or 2 slots, as
// a 2-wide fetch does, with random jumps and occasional line rewrites.
module tb_tc_hit_logic;
  import tc_pkg::word_t;
  import tc_pkg::waddr_t;

  localparam int LINES = 4, SLOTS = 4;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       acc_valid;
  waddr_t     acc_addr;
  logic [1:0] lk_idx, hl_idx, hit_line, hit_slot, hit_count;
  logic       lk_valid, hl_valid, hl_br_exist;
  waddr_t     lk_tag1, hl_tag1, hl_tag2;
  logic [1:0] hl_size_m1, hl_br_pos;
  word_t      lk_instr [SLOTS], hl_instr [SLOTS], hit_instr [2];
  logic       first_tag_hit, content_hit, comp_miss, conf_miss;

  tc_hit_logic #(.LINES(LINES), .SLOTS(SLOTS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // stored traces
  bit     v [LINES];
  int     n [LINES];
  int     bp [LINES];       // -1: no branch
  waddr_t ad [LINES][SLOTS];
  word_t  in [LINES][SLOTS];

  // memory read ports
  always_comb begin
    lk_valid = v[lk_idx]; lk_tag1 = ad[lk_idx][0]; lk_instr = in[lk_idx];
    hl_valid = v[hl_idx]; hl_tag1 = ad[hl_idx][0];
    hl_tag2 = (bp[hl_idx] >= 0 && bp[hl_idx] < n[hl_idx] - 1) ? ad[hl_idx][bp[hl_idx] + 1]
                                                                : ad[hl_idx][0];
    hl_size_m1 = 2'(n[hl_idx] - 1);
    hl_br_exist = bp[hl_idx] >= 0;
    hl_br_pos = 2'(bp[hl_idx] < 0 ? 0 : bp[hl_idx]);
    hl_instr = in[hl_idx];
  end

  // write a random trace starting at a word address with the line's index
  task automatic put(int l);
    automatic int first = $urandom_range(0, 15) * LINES + l;
    automatic int dest = $urandom_range(0, 63);
    n[l] = $urandom_range(2, SLOTS);
    bp[l] = $urandom_range(0, 1) ? $urandom_range(0, n[l] - 1) : -1;
    for (int s = 0; s < SLOTS; s++) begin
      ad[l][s] = (bp[l] >= 0 && s > bp[l]) ? waddr_t'(dest + s - bp[l] - 1) : waddr_t'(first + s);
      in[l][s] = $urandom;
    end
    v[l] = 1;
  endtask

  // expected hit state
  bit     e_flag;
  int     e_line, e_next;
  waddr_t e_first;

  initial begin
    int c_f = 0, c_c = 0, c_cm = 0, c_cf = 0;
    int cur_line = 0, cur_slot = 0;
    for (int l = 0; l < LINES; l++) begin v[l] = 0; n[l] = 2; bp[l] = -1; end
    ad = '{default: '0}; in = '{default: '0};
    acc_valid = 0; acc_addr = 0; e_flag = 0; e_line = 0; e_next = 0; e_first = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 6000; i++) begin
      automatic int r = $urandom_range(0, 99);
      automatic int e_o, e_slot = 0;   // 0 ftag 1 cont 2 comp 3 conf
      automatic int idx;
      if (i > 50 && $urandom_range(0, 49) == 0) put($urandom_range(0, LINES - 1));
      if (i == 30) for (int l = 0; l < LINES - 1; l++) put(l);
      // choose the next fetch address
      if (r < 30) begin
        cur_line = $urandom_range(0, LINES - 1); cur_slot = 0;
        acc_addr = ad[cur_line][0];
      end else if (r < 80 && cur_slot + 1 < n[cur_line]) begin
        cur_slot = cur_slot + $urandom_range(1, 2);
        if (cur_slot >= n[cur_line]) cur_slot = n[cur_line] - 1;
        acc_addr = ad[cur_line][cur_slot];
      end else acc_addr = waddr_t'($urandom_range(0, 63));
      acc_valid = $urandom_range(0, 9) != 0;
      #1;
      // expected outcome
      idx = int'(acc_addr) % LINES;
      if (v[idx] && ad[idx][0] == acc_addr) e_o = 0;
      else begin
        e_o = v[idx] ? 3 : 2;
        if (e_flag && v[e_line] && ad[e_line][0] == e_first)
          for (int j = e_next; j < n[e_line]; j++)
            if (ad[e_line][j] == acc_addr && e_o != 1) begin e_o = 1; e_slot = j; end
      end
      if (acc_valid) begin
        check(first_tag_hit == (e_o == 0), "first_tag_hit");
        check(content_hit == (e_o == 1), "content_hit");
        check(comp_miss == (e_o == 2), "comp_miss");
        check(conf_miss == (e_o == 3), "conf_miss");
        if (e_o == 0) begin
          check(int'(hit_line) == idx && hit_slot == 0, "ftag line/slot");
          check(hit_instr[0] == in[idx][0] && hit_instr[1] == in[idx][1] && hit_count == 2,
                "ftag instructions");
          c_f++;
        end
        if (e_o == 1) begin
          check(int'(hit_line) == e_line && int'(hit_slot) == e_slot, "content line/slot");
          check(hit_instr[0] == in[e_line][e_slot], "content instr 0");
          if (e_slot + 1 < n[e_line])
            check(hit_count == 2 && hit_instr[1] == in[e_line][e_slot + 1], "content instr 1");
          else check(hit_count == 1, "content count at end of trace");
          c_c++;
        end
        if (e_o == 2) c_cm++;
        if (e_o == 3) c_cf++;
        // expected state update
        if (e_o == 0) begin e_flag = 1; e_line = idx; e_first = acc_addr; e_next = 1; end
        else if (e_o == 1) e_next = e_slot + 1;
        else e_flag = 0;
      end else begin
        check(!first_tag_hit && !content_hit && !comp_miss && !conf_miss, "no access");
      end
      @(posedge clk); #1;
    end
    check(c_f > 0 && c_c > 0 && c_cm > 0 && c_cf > 0, "all outcomes seen");
    $display("ftag %0d cont %0d comp %0d conf %0d", c_f, c_c, c_cm, c_cf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
